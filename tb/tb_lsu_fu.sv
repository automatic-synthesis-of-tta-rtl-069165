// tb_lsu_fu: the load/store unit with a synchronous data memory in the
// testbench. Random word, half-word and byte stores and loads (signed and
// unsigned) are checked against a byte-array reference; a load result must
// appear exactly two cycles after its trigger and not one cycle early.
module tb_lsu_fu;
  import tta_pkg::*;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned AW = 6;
  logic clk = 0, rst_n = 0;
  logic en, opnd_we, trigger, dmem_en;
  logic [31:0] opnd_in, trig_in, result, dmem_wdata, dmem_rdata;
  lsu_op_e op;
  logic [3:0] dmem_be;
  logic [AW-1:0] dmem_addr;
  logic [31:0] mem [DEPTH];
  logic [7:0]  refb [4*DEPTH];
  int checks = 0, failures = 0, n_load = 0, n_store = 0;

  lsu_fu #(.W(32), .DEPTH(DEPTH), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (dmem_en) begin
      for (int i = 0; i < 4; i++) if (dmem_be[i]) mem[dmem_addr][8*i +: 8] <= dmem_wdata[8*i +: 8];
      dmem_rdata <= mem[dmem_addr];
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [31:0] ref_load(lsu_op_e o, int a);
    case (o)
      LSU_LDW:  return {refb[a+3], refb[a+2], refb[a+1], refb[a]};
      LSU_LDH:  return {{16{refb[a+1][7]}}, refb[a+1], refb[a]};
      LSU_LDHU: return {16'b0, refb[a+1], refb[a]};
      LSU_LDQ:  return {{24{refb[a][7]}}, refb[a]};
      default:  return {24'b0, refb[a]};
    endcase
  endfunction

  initial begin
    logic [31:0] exp;
    int a;
    en = 1; opnd_we = 0; trigger = 0; opnd_in = 0; trig_in = 0; op = LSU_LDW;
    for (int i = 0; i < DEPTH; i++) begin
      mem[i] = 0;
      for (int j = 0; j < 4; j++) refb[4*i+j] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      op = lsu_op_e'(1 + $urandom % 8);
      a = $urandom % (4 * DEPTH);
      if (op inside {LSU_LDW, LSU_STW}) a = a & ~3;
      if (op inside {LSU_LDH, LSU_LDHU, LSU_STH}) a = a & ~1;
      trig_in = a;
      opnd_we = 1; opnd_in = $urandom;
      trigger = 1;
      if (op inside {LSU_STW, LSU_STH, LSU_STQ}) begin
        n_store++;
        @(negedge clk);
        trigger = 0; opnd_we = 0;
        refb[a] = opnd_in[7:0];
        if (op != LSU_STQ) refb[a+1] = opnd_in[15:8];
        if (op == LSU_STW) begin refb[a+2] = opnd_in[23:16]; refb[a+3] = opnd_in[31:24]; end
      end else begin
        n_load++;
        exp = ref_load(op, a);
        @(negedge clk);
        trigger = 0; opnd_we = 0;
        if (exp != result) check(1, "load not early"); else checks++;
        @(negedge clk);
        check(result == exp, $sformatf("load %s", op.name()));
      end
    end
    check(n_load > 0 && n_store > 0, "both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
