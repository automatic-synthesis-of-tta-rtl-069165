// tb_fifo_write_fu: the FIFO write unit. Random write and status triggers
// against a modelled FIFO level: writes must push the trigger value exactly
// when the FIFO has room and raise the stall request when it is full; status
// must return the free count one cycle after its trigger; the lock (en low)
// must block both.
module tb_fifo_write_fu;
  import tta_pkg::*;
  localparam int unsigned CW = 9;
  localparam int unsigned DEPTH = 6;
  logic clk = 0, rst_n = 0;
  logic en, trigger, stall_req, fifo_full, fifo_push;
  sout_op_e op;
  logic [31:0] data, result, fifo_wdata;
  logic [CW-1:0] fifo_free;
  int checks = 0, failures = 0, n_stall = 0, n_write = 0, n_status = 0;
  int level = 0;

  fifo_write_fu #(.W(32), .CW(CW)) dut (.*);

  always #5 clk = ~clk;
  assign fifo_full = (level == DEPTH);
  assign fifo_free = CW'(DEPTH - level);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [31:0] exp_status;
    bit          status_due;
    en = 1; trigger = 0; op = SOUT_NONE; data = 0; status_due = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if (status_due) check(result == exp_status, "status value");
      status_due = 0;
      if ($urandom % 3 == 0 && level > 0) level--;      // consumer
      trigger = ($urandom % 4 != 0);
      op = ($urandom % 3 == 0) ? SOUT_STATUS : SOUT_WRITE;
      data = $urandom;
      en = ($urandom % 10 != 0);
      #1;
      if (trigger && op == SOUT_WRITE) begin
        check(stall_req == fifo_full, "stall iff full");
        check(fifo_push == (en && !fifo_full), "push iff room and unlocked");
        if (fifo_push) check(fifo_wdata == data, "pushed value");
        if (stall_req) n_stall++;
        if (fifo_push) begin n_write++; level++; end
      end else begin
        check(fifo_push == 0 && stall_req == 0, "idle");
        if (trigger && en) begin
          exp_status = 32'(DEPTH - level);
          status_due = 1;
          n_status++;
        end
      end
    end
    check(n_stall > 0 && n_write > 0 && n_status > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
