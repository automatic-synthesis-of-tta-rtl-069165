// tb_gcu: instruction fetch and control flow. Checks sequential fetch,
// `run` low holding the program at address 0, a jump redirecting the fetch
// after one delay slot, `call` storing the address after the delay slot in
// RA, a write of RA through its port, and the lock freezing the fetch.
module tb_gcu;
  import tta_pkg::*;
  localparam int unsigned IW = 10;
  logic clk = 0, rst_n = 0;
  logic run, en, trigger, ra_we, imem_en, exec_valid;
  gcu_op_e op;
  logic [31:0] target, ra_in, ra;
  logic [IW-1:0] imem_addr;
  int checks = 0, failures = 0;

  gcu #(.IW(IW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    run = 0; en = 1; trigger = 0; ra_we = 0; op = GCU_JUMP; target = 0; ra_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(imem_addr == 0 && !exec_valid && !imem_en, "held while not running");
    run = 1;
    #1 check(imem_en, "fetch enabled");
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      check(imem_addr == IW'(i + 1), "sequential fetch");
      check(exec_valid, "executing");
    end
    // executing word 4 (fetch address 5): jump to 100
    trigger = 1; op = GCU_JUMP; target = 100;
    @(negedge clk);
    trigger = 0;
    check(imem_addr == 100, "jump target fetched after the delay slot");
    @(negedge clk);
    check(imem_addr == 101, "continues after target");
    // call 200 from the word at 100 (fetch address 101): RA = 102
    trigger = 1; op = GCU_CALL; target = 200;
    @(negedge clk);
    trigger = 0;
    check(imem_addr == 200, "call target");
    check(ra == 102, "return address");
    // lock: nothing moves
    en = 0;
    repeat (3) @(negedge clk);
    check(imem_addr == 200 && !imem_en, "frozen under lock");
    en = 1;
    @(negedge clk);
    check(imem_addr == 201, "resumes");
    // return: jump to RA
    trigger = 1; op = GCU_JUMP; target = ra;
    @(negedge clk);
    trigger = 0;
    check(imem_addr == 102, "return");
    ra_we = 1; ra_in = 32'h155;
    @(negedge clk);
    ra_we = 0;
    check(ra == 32'h155, "RA written through its port");
    run = 0;
    @(negedge clk);
    check(imem_addr == 0 && !exec_valid, "restart at 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
