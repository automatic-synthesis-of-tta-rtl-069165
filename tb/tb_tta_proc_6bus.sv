// tb_tta_proc_6bus: a six-bus processor (the configuration of the network's
// interpolation, add and idct2d processors) running a test actor that uses
// the extra buses: both inputs are read in one instruction, then one
// instruction makes six moves at once (ALU operand and trigger, LOGIC operand
// and trigger, a register write and the loop jump), and both outputs are
// written together in the jump's delay slot.
//
// Per firing: out0 = a + b, out1 = a ^ b. With both inputs kept full and
// both outputs drained, one firing takes exactly 5 cycles; the testbench
// checks every output token and that the push interval is 5 cycles.
module tb_tta_proc_6bus;
  import tta_pkg::*;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned NTOK = 200;
  localparam int unsigned NB = 6;
  logic clk = 0, rst_n = 0, run = 0;
  logic load_we = 0, load_sel = 0;
  logic [15:0] load_addr = 0;
  logic [MAX_BUSES*SLOT_W-1:0] load_data = '0;
  logic stalled;

  logic [1:0]         i_push, i_full, i_empty, i_pop, o_push, o_full, o_empty, o_pop;
  logic [1:0][31:0]   i_wdata, i_rdata, o_wdata, o_rdata;
  logic [1:0][CW-1:0] i_free, i_count, o_free, o_count;

  for (genvar k = 0; k < 2; k++) begin : g_f
    hw_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_in (
      .clk, .rst_n, .push(i_push[k]), .wdata(i_wdata[k]), .full(i_full[k]), .free(i_free[k]),
      .pop(i_pop[k]), .rdata(i_rdata[k]), .empty(i_empty[k]), .count(i_count[k]));
    hw_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_out (
      .clk, .rst_n, .push(o_push[k]), .wdata(o_wdata[k]), .full(o_full[k]), .free(o_free[k]),
      .pop(o_pop[k]), .rdata(o_rdata[k]), .empty(o_empty[k]), .count(o_count[k]));
  end

  tta_proc #(.NUM_BUSES(NB), .NIN(2), .NOUT(2), .IMEM_WORDS(8), .DMEM_WORDS(4), .CW(CW)) dut (
    .clk, .rst_n, .run, .load_we, .load_sel, .load_addr, .load_data,
    .in_rdata(i_rdata), .in_empty(i_empty), .in_count(i_count), .in_pop(i_pop),
    .out_full(o_full), .out_free(o_free), .out_push(o_push), .out_wdata(o_wdata),
    .stalled);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

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

  localparam logic [UNIT_W-1:0] SIN0 = U_STREAM_BASE, SIN1 = U_STREAM_BASE + 1,
                                SOUT0 = U_STREAM_BASE + 2, SOUT1 = U_STREAM_BASE + 3;
  slot_t prog [8][NB];

  initial begin
    for (int a = 0; a < 8; a++) for (int b = 0; b < NB; b++) prog[a][b] = nop();
    prog[0][0] = mvi(0, port(SIN0, SIN_READ));
    prog[0][1] = mvi(0, port(SIN1, SIN_READ));
    prog[3][0] = mv(port(SIN0, 0), port(U_ALU, ALU_OPND));
    prog[3][1] = mv(port(SIN1, 0), port(U_ALU, ALU_ADD));
    prog[3][2] = mv(port(SIN0, 0), port(U_LOGIC, LOG_OPND));
    prog[3][3] = mv(port(SIN1, 0), port(U_LOGIC, LOG_XOR));
    prog[3][4] = mv(port(SIN0, 0), port(U_RF1, 0));
    prog[3][5] = mvi(0, port(U_GCU, GCU_JUMP));
    prog[4][2] = mv(port(U_ALU, 0), port(SOUT0, SOUT_WRITE));
    prog[4][5] = mv(port(U_LOGIC, 0), port(SOUT1, SOUT_WRITE));
  end

  logic [31:0] exp0[$], exp1[$];
  int produced = 0, consumed = 0, cyc = 0, last_push = -1, n_interval = 0;

  initial begin
    i_push = '0; i_wdata = '0; o_pop = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int a = 0; a < 8; a++) begin
      load_we = 1; load_sel = 0; load_addr = 16'(a); load_data = '0;
      for (int b = 0; b < NB; b++) load_data[b*SLOT_W +: SLOT_W] = prog[a][b];
      @(negedge clk);
    end
    load_we = 0;
    run = 1;
    while (consumed < NTOK) begin
      @(negedge clk);
      cyc++;
      i_push = '0;
      if (produced < NTOK && !i_full[0] && !i_full[1]) begin
        logic [31:0] a, b;
        a = $urandom; b = $urandom;
        exp0.push_back(a + b);
        exp1.push_back(a ^ b);
        i_push = 2'b11; i_wdata[0] = a; i_wdata[1] = b;
        produced++;
      end
      #1;
      if (o_push[0]) begin
        check(o_push[1], "both outputs written in one instruction");
        if (last_push >= 0 && produced < NTOK) begin
          check(cyc - last_push == 5, "one firing every 5 cycles");
          n_interval++;
        end
        last_push = cyc;
      end
      o_pop = ~o_empty;
      if (o_pop[0]) begin
        check(o_rdata[0] == exp0[0], "out0 = a + b");
        void'(exp0.pop_front());
        consumed++;
      end
      if (o_pop[1]) begin
        check(o_rdata[1] == exp1[0], "out1 = a ^ b");
        void'(exp1.pop_front());
      end
    end
    check(n_interval > 50, "rate measured");
    check(dut.u_core.u_rf1.regs[0] != 0, "sixth move reached RF_1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
