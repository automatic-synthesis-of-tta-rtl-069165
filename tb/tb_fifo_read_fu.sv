// tb_fifo_read_fu: the FIFO read unit against a queue model of its FIFO.
// Random status / peek / read triggers (skipping ones whose results would
// collide in the result register) are checked at exactly their latency
// (status 1, peek 2, read 3 cycles): the result must not be there one cycle
// early and must be there on time. Reads and peeks on an empty FIFO must
// raise the stall request and pop nothing; with the lock applied (en low)
// nothing may be popped either.
module tb_fifo_read_fu;
  import tta_pkg::*;
  localparam int unsigned CW = 9;
  logic clk = 0, rst_n = 0;
  logic en, trigger, stall_req, fifo_empty, fifo_pop;
  sin_op_e op;
  logic [31:0] result, fifo_rdata;
  logic [CW-1:0] fifo_count;
  int checks = 0, failures = 0;
  int n_stall = 0, n_read = 0, n_peek = 0, n_status = 0;
  logic [31:0] q[$];

  fifo_read_fu #(.W(32), .CW(CW)) dut (.*);

  always #5 clk = ~clk;
  assign fifo_empty = (q.size() == 0);
  assign fifo_rdata = (q.size() > 0) ? q[0] : 32'hdead_beef;
  assign fifo_count = CW'(q.size());

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // expected results by arrival cycle
  logic [31:0] exp_val [0:8191];
  bit          exp_vld [0:8191];
  logic [31:0] prev;

  initial begin
    en = 1; trigger = 0; op = SIN_NONE;
    for (int i = 0; i < 8192; i++) exp_vld[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8000; t++) begin
      @(negedge clk);
      // check arrivals
      if (exp_vld[t]) check(result == exp_val[t], "result on time");
      else if (t > 0 && exp_vld[t+1]) check(result != exp_val[t+1] || result == prev, "not early");
      prev = result;
      // producer side: add tokens now and then
      if ($urandom % 8 == 0 && q.size() < 40) q.push_back($urandom);
      // random operation
      trigger = ($urandom % 2 == 0);
      op = sin_op_e'(1 + $urandom % 3);
      en = 1;
      if (trigger) begin
        int lat;
        lat = (op == SIN_STATUS) ? LAT_SIN_STATUS : (op == SIN_PEEK) ? LAT_SIN_PEEK : LAT_SIN_READ;
        #1;
        if (op != SIN_STATUS && fifo_empty) begin
          check(stall_req == 1 && fifo_pop == 0, "stall on empty");
          n_stall++;
          trigger = 0;     // the core would hold; here the trigger is dropped
        end else begin
          check(stall_req == 0, "no stall");
          if (exp_vld[t+lat] || (lat < 3 && exp_vld[t+lat+1]) || (lat < 2 && exp_vld[t+lat+2]))
            trigger = 0;   // would collide in the result register
          else begin
            exp_vld[t+lat] = 1;
            exp_val[t+lat] = (op == SIN_STATUS) ? 32'(q.size()) : q[0];
            #1 check(fifo_pop == (op == SIN_READ), "pop only on read");
            if (op == SIN_READ) n_read++; else if (op == SIN_PEEK) n_peek++; else n_status++;
          end
        end
      end
      @(posedge clk);
      #1;
      if (trigger && en && op == SIN_READ) void'(q.pop_front());
    end
    // global lock: a read issued, then two locked cycles, must arrive two
    // cycles late and pop exactly once
    @(negedge clk);
    trigger = 0;
    q.delete();
    q.push_back(32'h1234_5678);
    q.push_back(32'h9abc_def0);
    repeat (4) @(negedge clk);
    trigger = 1; op = SIN_READ; en = 1;
    #1 check(fifo_pop == 1, "pop before lock");
    @(posedge clk); #1 void'(q.pop_front());
    @(negedge clk);
    trigger = 0; en = 0;
    #1 check(fifo_pop == 0, "no pop under lock");
    repeat (2) @(negedge clk);
    check(result != 32'h1234_5678, "frozen under lock");
    en = 1;
    @(negedge clk);
    check(result != 32'h1234_5678, "not early after lock");
    @(negedge clk);
    check(result == 32'h1234_5678, "arrives after lock");
    check(q.size() == 1, "single pop");
    check(n_stall > 0 && n_read > 0 && n_peek > 0 && n_status > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
