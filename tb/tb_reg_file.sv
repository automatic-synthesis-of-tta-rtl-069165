// tb_reg_file: a 12 x 32 register file and a 2 x 1 BOOL file against array
// models. Random writes and reads; a write is visible from the next cycle,
// a locked write (en low) is dropped, and `regs` mirrors every register.
module tb_reg_file;
  logic clk = 0, rst_n = 0;
  logic en, we, bwe;
  logic [3:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [11:0][31:0] regs;
  logic [0:0] bwaddr, braddr, bwdata, brdata;
  logic [1:0][0:0] bregs;
  logic [31:0] model [12];
  logic        bmodel [2];
  int checks = 0, failures = 0;

  reg_file #(.W(32), .REGS(12)) dut (.clk, .rst_n, .en, .we, .waddr, .wdata, .raddr, .rdata, .regs);
  reg_file #(.W(1), .REGS(2)) dut_b (.clk, .rst_n, .en, .we(bwe), .waddr(bwaddr), .wdata(bwdata),
                                     .raddr(braddr), .rdata(brdata), .regs(bregs));
  always #5 clk = ~clk;

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
    en = 1; we = 0; bwe = 0; waddr = 0; raddr = 0; wdata = 0; bwaddr = 0; braddr = 0; bwdata = 0;
    foreach (model[i]) model[i] = 0;
    bmodel[0] = 0; bmodel[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int i = 0; i < 12; i++) check(regs[i] == model[i], "regs mirror");
      raddr = 4'($urandom % 12);
      braddr = 1'($urandom % 2);
      #1 check(rdata == model[raddr], "read");
      check(brdata == bmodel[braddr], "bool read");
      we = $urandom % 2; waddr = 4'($urandom % 12); wdata = $urandom;
      bwe = $urandom % 2; bwaddr = 1'($urandom % 2); bwdata = 1'($urandom % 2);
      en = ($urandom % 8 != 0);
      if (we) begin
        raddr = waddr;
        #1 check(rdata == model[waddr], "old value until the edge");
      end
      @(posedge clk); #1;
      if (we && en) model[waddr] = wdata;
      if (bwe && en) bmodel[bwaddr] = bwdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
