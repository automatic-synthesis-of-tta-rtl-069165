// tb_hw_fifo: random push/pop traffic against a queue reference model.
// Checks the head token, the fill level, free count and the empty/full flags
// every cycle, with a small depth so that full and empty are both reached.
module tb_hw_fifo;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned CW = $clog2(DEPTH + 1);
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [31:0] wdata, rdata;
  logic [CW-1:0] free, count;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0;
  logic [31:0] model[$];

  hw_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // compare state against the model
      check(count == CW'(model.size()), "count");
      check(free == CW'(DEPTH - model.size()), "free");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      if (model.size() > 0) check(rdata == model[0], "head");
      if (full) n_full++;
      if (empty) n_empty++;
      // bias phases towards filling and towards draining
      push  = ((i / 200) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      push  = push && !full;
      pop   = ($urandom % 2 == 0) && !empty;
      wdata = $urandom;
      @(posedge clk);
      #1;
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    check(n_full > 0, "full reached");
    check(n_empty > 0, "empty reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
