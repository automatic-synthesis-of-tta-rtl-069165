// tb_tta_core: the processor core alone, with its instruction and data
// memories modelled in the testbench, running a small actor program between
// two input FIFOs and one output FIFO.
//
// The program, per firing: read a from input 0, peek then read b from input
// 1, s = a + b (ALU), t = s ^ b (LOGIC), store s and load it back (LSU),
// flag = t >u 100 into BOOL[0], out = flag ? s - 1 : s using guarded moves,
// then call a subroutine that writes out to the output FIFO and returns
// through RA; FIFO status is queried on both sides. The testbench feeds and
// drains the FIFOs at random rates with depth-4 FIFOs, so the processor
// stalls both on empty inputs and on a full output, and compares every output
// token with the value computed here.
module tb_tta_core;
  import tta_pkg::*;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned NTOK = 300;
  logic clk = 0, rst_n = 0, run = 0;
  logic stalled;

  // FIFOs around the processor
  logic [1:0]        i_push, i_full, i_empty, i_pop;
  logic [1:0][31:0]  i_wdata, i_rdata;
  logic [1:0][CW-1:0] i_free, i_count;
  logic [0:0]        o_push, o_full, o_empty, o_pop;
  logic [0:0][31:0]  o_wdata, o_rdata;
  logic [0:0][CW-1:0] o_free, o_count;

  for (genvar k = 0; k < 2; k++) begin : g_in
    hw_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_f (
      .clk, .rst_n, .push(i_push[k]), .wdata(i_wdata[k]), .full(i_full[k]), .free(i_free[k]),
      .pop(i_pop[k]), .rdata(i_rdata[k]), .empty(i_empty[k]), .count(i_count[k]));
  end
  hw_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_out (
    .clk, .rst_n, .push(o_push[0]), .wdata(o_wdata[0]), .full(o_full[0]), .free(o_free[0]),
    .pop(o_pop[0]), .rdata(o_rdata[0]), .empty(o_empty[0]), .count(o_count[0]));

  logic              imem_en, dmem_en;
  logic [4:0]        imem_addr;
  logic [59:0]       instr;
  logic [3:0]        dmem_be, dmem_addr;
  logic [31:0]       dmem_wdata, dmem_rdata;
  logic [59:0]       imem [32];
  logic [31:0]       dmem [16];

  always_ff @(posedge clk) begin
    if (imem_en) instr <= imem[imem_addr];
    if (dmem_en) begin
      for (int i = 0; i < 4; i++) if (dmem_be[i]) dmem[dmem_addr][8*i +: 8] <= dmem_wdata[8*i +: 8];
      dmem_rdata <= dmem[dmem_addr];
    end
  end

  tta_core #(.NUM_BUSES(2), .NIN(2), .NOUT(1), .IW(5), .DMEM_WORDS(16), .CW(CW)) dut (
    .clk, .rst_n, .run,
    .imem_en, .imem_addr, .instr,
    .dmem_en, .dmem_be, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .in_rdata(i_rdata), .in_empty(i_empty), .in_count(i_count), .in_pop(i_pop),
    .out_full(o_full), .out_free(o_free), .out_push(o_push), .out_wdata(o_wdata),
    .stalled);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall_empty = 0, n_stall_full = 0, n_guard_t = 0, n_guard_f = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- program -----------------
  localparam logic [UNIT_W-1:0] SIN0 = U_STREAM_BASE, SIN1 = U_STREAM_BASE + 1,
                                SOUT0 = U_STREAM_BASE + 2;
  slot_t prog [32][2];

  task automatic put(int a, slot_t s0, slot_t s1);
    prog[a][0] = s0; prog[a][1] = s1;
  endtask

  initial begin
    for (int a = 0; a < 32; a++) put(a, nop(), nop());
    put(0,  mvi(0, port(SIN0, SIN_READ)),            mvi(0, port(SIN1, SIN_PEEK)));
    put(2,  mv(port(SIN1, 0), port(U_RF2, 1)),       mvi(0, port(SIN1, SIN_READ)));
    put(3,  mv(port(SIN0, 0), port(U_RF1, 0)),       nop());
    put(4,  mv(port(U_RF1, 0), port(U_ALU, ALU_OPND)), mv(port(U_RF2, 1), port(U_ALU, ALU_ADD)));
    put(5,  mv(port(SIN1, 0), port(U_RF2, 2)),       mv(port(U_ALU, 0), port(U_LOGIC, LOG_OPND)));
    put(6,  mv(port(U_RF2, 2), port(U_LOGIC, LOG_XOR)), mv(port(U_ALU, 0), port(U_LSU, LSU_OPND)));
    put(7,  mvi(8, port(U_LSU, LSU_STW)),            mv(port(U_LOGIC, 0), port(U_ALU, ALU_OPND)));
    put(8,  mvi(8, port(U_LSU, LSU_LDW)),            mvi(100, port(U_ALU, ALU_GTU)));
    put(9,  mv(port(U_ALU, 0), port(U_BOOL, 0)),     nop());
    put(10, mv(port(U_LSU, 0), port(U_RF1, 3)),      nop());
    put(11, mv(port(U_RF1, 3), port(U_ALU, ALU_OPND)), mvi(1, port(U_ALU, ALU_SUB), G_B0));
    put(12, mv(port(U_ALU, 0), port(U_RF1, 5), G_B0), mv(port(U_RF1, 3), port(U_RF1, 5), G_NB0));
    put(13, mvi(20, port(U_GCU, GCU_CALL)),          nop());
    put(14, mvi(0, port(SOUT0, SOUT_STATUS)),        nop());
    put(15, mv(port(SOUT0, 0), port(U_RF2, 5)),      nop());
    put(16, mvi(0, port(U_GCU, GCU_JUMP)),           nop());
    put(17, mvi(0, port(SIN0, SIN_STATUS)),          nop());
    put(20, mv(port(U_RF1, 5), port(SOUT0, SOUT_WRITE)), nop());
    put(21, mv(port(U_GCU, GCU_RA), port(U_GCU, GCU_JUMP)), nop());
  end

  // ---------------- stimulus and checking -----------------
  logic [31:0] exp_q[$];
  int produced = 0, consumed = 0, cyc = 0;

  initial begin
    i_push = '0; i_wdata = '0; o_pop = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int a = 0; a < 32; a++) imem[a] = {prog[a][1], prog[a][0]};
    for (int a = 0; a < 16; a++) dmem[a] = '0;
    run = 1;
    while (consumed < NTOK) begin
      @(negedge clk);
      // producer: both inputs, random rate, random phases of starvation
      i_push = '0;
      if (produced < NTOK && !i_full[0] && !i_full[1] && ((cyc % 1500 > 1200) ? ($urandom % 64 == 0) : ($urandom % 4 == 0))) begin
        logic [31:0] a, b, s, t;
        a = ($urandom % 2) ? $urandom % 150 : $urandom;
        b = $urandom % 40;
        s = a + b; t = s ^ b;
        exp_q.push_back((t > 100) ? s - 1 : s);
        if (t > 100) n_guard_t++; else n_guard_f++;
        i_push = 2'b11; i_wdata[0] = a; i_wdata[1] = b;
        produced++;
      end
      // consumer: slow at first so the output fills
      cyc++;
      o_pop[0] = !o_empty[0] && ((cyc % 1000 < 300) ? 1'b0 : ($urandom % 2 == 0));
      if (o_pop[0]) begin
        check(exp_q.size() > 0 && o_rdata[0] == exp_q[0], "output token");
        void'(exp_q.pop_front());
        consumed++;
      end
      if (stalled && (i_empty[0] || i_empty[1])) n_stall_empty++;
      if (stalled && o_full[0]) n_stall_full++;
    end
    check(n_stall_empty > 0, "stalled on empty input");
    check(n_stall_full > 0, "stalled on full output");
    check(n_guard_t > 0 && n_guard_f > 0, "both guard outcomes");
    $display("stalls: empty %0d full %0d", n_stall_empty, n_stall_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
