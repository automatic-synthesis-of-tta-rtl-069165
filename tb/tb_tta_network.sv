// tb_tta_network: the whole 21-processor network, at its default sizes,
// running one complete stream of tokens from the source to the display.
//
// The actor programs of the decoder are software and are not part of this
// hardware, so every processor is loaded with a small test actor instead:
//   source  - streams NTOK words out of a 64-word table in its data memory
//             (wrapping around), then halts;
//   buffer  - first emits one initial token 0 on each output (this breaks the
//             add -> broadcast -> buffer -> interpolation -> add feedback
//             loop), then behaves like the others;
//   others  - each firing reads one token from every input in turn, adds
//             them to the processor number, and writes the sum to every
//             output (the display's output is the top-level pins).
// A reference model in the testbench computes every token of every FIFO the
// same way, and each display token is compared with it.
//
// The display is held back (display_ready low) for a long stretch so that
// FIFOs fill up and processors stall on full outputs; starting up and the
// feedback loop make processors stall on empty inputs. Both kinds of stall,
// the display back-pressure, a completely full FIFO and the initial token
// of the feedback loop are counted and must each happen.
module tb_tta_network;
  import tta_pkg::*;
  localparam int unsigned NTOK = 700;
  localparam int unsigned TABLE = 64;

  logic clk = 0, rst_n = 0, run = 0;
  logic load_we = 0, load_sel = 0;
  logic [4:0] load_proc = 0;
  logic [15:0] load_addr = 0;
  logic [MAX_BUSES*SLOT_W-1:0] load_data = '0;
  logic display_valid, display_ready;
  logic [31:0] display_data;
  logic [NUM_PROCS-1:0] proc_stalled;
  logic [NUM_EDGES-1:0] fifo_full, fifo_empty;

  tta_network dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d display tokens", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- program generation -----------------
  slot_t prog [64][MAX_BUSES];
  int    plen;

  task automatic clear_prog();
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < MAX_BUSES; b++) prog[a][b] = nop();
    plen = 0;
  endtask

  task automatic put(slot_t s0, slot_t s1 = nop());
    prog[plen][0] = s0; prog[plen][1] = s1; plen++;
  endtask

  function automatic logic [UNIT_W-1:0] sin(int k);
    return UNIT_W'(32'(U_STREAM_BASE) + k);
  endfunction

  function automatic logic [UNIT_W-1:0] sout(int nin, int k);
    return UNIT_W'(32'(U_STREAM_BASE) + nin + k);
  endfunction

  task automatic gen_source();
    clear_prog();
    put(mvi(0, port(U_RF1, 1)),                        mvi(NTOK, port(U_RF2, 2)));
    put(mv(port(U_RF1, 1), port(U_LSU, LSU_LDW)),      mv(port(U_RF1, 1), port(U_ALU, ALU_OPND)));
    put(mvi(4, port(U_ALU, ALU_ADD)),                  mvi(4 * TABLE - 1, port(U_LOGIC, LOG_OPND)));
    put(mv(port(U_LSU, 0), port(sout(0, 0), SOUT_WRITE)), mv(port(U_ALU, 0), port(U_LOGIC, LOG_AND)));
    put(mv(port(U_LOGIC, 0), port(U_RF1, 1)),          mv(port(U_RF2, 2), port(U_ALU, ALU_OPND)));
    put(mvi(1, port(U_ALU, ALU_SUB)));
    put(mv(port(U_ALU, 0), port(U_RF2, 2)),            mv(port(U_ALU, 0), port(U_ALU, ALU_OPND)));
    put(mvi(0, port(U_ALU, ALU_EQ)));
    put(mv(port(U_ALU, 0), port(U_BOOL, 0)));
    put(mvi(1, port(U_GCU, GCU_JUMP), G_NB0));
    put(nop());
    put(mvi(11, port(U_GCU, GCU_JUMP)));
    put(nop());
  endtask

  task automatic gen_actor(int p, int nin, int nout, bit initial_token);
    int start;
    clear_prog();
    if (initial_token)
      for (int k = 0; k < nout; k++) put(mvi(0, port(sout(nin, k), SOUT_WRITE)));
    start = plen;
    put(mvi(p, port(U_RF1, 0)));
    for (int k = 0; k < nin; k++) begin
      put(mvi(0, port(sin(k), SIN_READ)));
      put(nop());
      put(nop());
      put(mv(port(U_RF1, 0), port(U_ALU, ALU_OPND)), mv(port(sin(k), 0), port(U_ALU, ALU_ADD)));
      put(mv(port(U_ALU, 0), port(U_RF1, 0)));
    end
    for (int k = 0; k < nout; k++) put(mv(port(U_RF1, 0), port(sout(nin, k), SOUT_WRITE)));
    put(mvi(start, port(U_GCU, GCU_JUMP)));
    put(nop());
  endtask

  // ---------------- reference model -----------------
  logic [31:0] table_data [TABLE];
  logic [31:0] tok [NUM_EDGES][NTOK + 1];
  logic [31:0] disp_exp [NTOK];

  function automatic void build_model();
    for (int n = 0; n < NTOK; n++) begin
      bit done [NUM_PROCS];
      for (int p = 0; p < NUM_PROCS; p++) done[p] = 0;
      for (int pass = 0; pass < NUM_PROCS; pass++)
        for (int p = 0; p < NUM_PROCS; p++) begin
          bit ready = 1;
          logic [31:0] v = 32'(p);
          if (done[p]) continue;
          for (int e = 0; e < NUM_EDGES; e++)
            if (EDGE_DST[e] == p) begin
              // token n of the buffer comes from its previous firing
              int src = EDGE_SRC[e];
              if (!done[src] && src != P_BUFFER) ready = 0;
              v += tok[e][n];
            end
          if (p == P_SOURCE) v = table_data[n % TABLE];
          if (p == P_BUFFER) begin
            // output n of the buffer is its firing n-1 (or the initial 0)
            ready = 1;
            for (int e = 0; e < NUM_EDGES; e++) if (EDGE_DST[e] == p && !done[EDGE_SRC[e]]) ready = 0;
            if (!ready) continue;
            for (int e = 0; e < NUM_EDGES; e++) if (EDGE_SRC[e] == p) tok[e][n + 1] = v;
            done[p] = 1;
            continue;
          end
          if (!ready) continue;
          for (int e = 0; e < NUM_EDGES; e++) if (EDGE_SRC[e] == p) tok[e][n] = v;
          if (p == P_DISPLAY) disp_exp[n] = v;
          done[p] = 1;
        end
      for (int p = 0; p < NUM_PROCS; p++)
        if (!done[p]) $display("model: processor %0d not fired for token %0d", p, n);
    end
  endfunction

  // ---------------- run -----------------
  int received = 0, cyc = 0;
  int n_stall_empty = 0, n_stall_full = 0, n_backpressure = 0, n_fifo_full = 0;
  int n_wide_busy = 0;

  initial begin
    display_ready = 0;
    for (int i = 0; i < TABLE; i++) table_data[i] = $urandom;
    // the buffer's first output token on each of its FIFOs
    for (int e = 0; e < NUM_EDGES; e++) if (EDGE_SRC[e] == P_BUFFER) tok[e][0] = 0;
    build_model();

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // load programs and the source's table
    for (int p = 0; p < NUM_PROCS; p++) begin
      int nin, nout;
      nin  = num_inputs(p);
      nout = num_outputs(p) + ((p == P_DISPLAY) ? 1 : 0);
      if (p == P_SOURCE) gen_source();
      else gen_actor(p, nin, nout, p == P_BUFFER);
      check(plen <= int'(PROC_IMEM[p]), "program fits instruction memory");
      for (int a = 0; a < plen; a++) begin
        load_we = 1; load_sel = 0; load_proc = 5'(p); load_addr = 16'(a);
        load_data = '0;
        for (int b = 0; b < MAX_BUSES; b++)
          if (b < int'(PROC_BUSES[p])) load_data[b*SLOT_W +: SLOT_W] = prog[a][b];
        @(negedge clk);
      end
    end
    for (int i = 0; i < TABLE; i++) begin
      load_we = 1; load_sel = 1; load_proc = 5'(P_SOURCE); load_addr = 16'(i);
      load_data = '0; load_data[31:0] = table_data[i];
      @(negedge clk);
    end
    load_we = 0;
    run = 1;

    while (received < NTOK) begin
      @(negedge clk);
      cyc++;
      display_ready = (cyc < 20000) ? 1'b0 : ($urandom % 3 != 0);
      #1;
      if (display_valid && display_ready) begin
        check(display_data == disp_exp[received], $sformatf("display token %0d", received));
        received++;
      end
      for (int e = 0; e < NUM_EDGES; e++) begin
        if (fifo_full[e] && proc_stalled[EDGE_SRC[e]]) n_stall_full++;
        if (fifo_empty[e] && proc_stalled[EDGE_DST[e]]) n_stall_empty++;
        if (fifo_full[e]) n_fifo_full++;
      end
      if (!display_ready && proc_stalled[P_DISPLAY]) n_backpressure++;
      if (!proc_stalled[P_IDCT2D] || !proc_stalled[P_INTERP] || !proc_stalled[P_ADD]) n_wide_busy++;
    end
    repeat (20) @(negedge clk);
    check(!display_valid, "no extra display token");
    $display("cycles %0d: stall-on-full %0d, stall-on-empty %0d, display back-pressure %0d, full-FIFO %0d",
             cyc, n_stall_full, n_stall_empty, n_backpressure, n_fifo_full);
    check(n_stall_full > 0, "a processor stalled on a full FIFO");
    check(n_stall_empty > 0, "a processor stalled on an empty FIFO");
    check(n_backpressure > 0, "display back-pressure");
    check(n_fifo_full > 0, "a FIFO filled completely");
    check(n_wide_busy > 0, "six-bus processors ran");
    check(!fifo_empty[11], "feedback loop holds its extra token");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
