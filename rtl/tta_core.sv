// tta_core: a transport-triggered (TTA) processor core in the configuration
// of the network's processors: an ALU, a load/store unit, a LOGIC unit, a
// 2 x 1-bit BOOL register file, two 12 x 32-bit register files (RF_1, RF_2),
// the global control unit (GCU), one FIFO read unit per input FIFO of the
// actor and one FIFO write unit per output FIFO, all joined by NUM_BUSES
// transport buses.
//
// How it works: the only instruction is the move. An instruction word holds
// one move slot per bus (layout in tta_pkg). In each cycle every slot whose
// guard holds copies one value - a unit's result, a register, or a short
// immediate - onto its bus and from the bus into an operand, trigger or
// register port. Writing a trigger port starts that unit's operation; results
// appear in the unit's result register after the operation's latency, and the
// program (the compiler's schedule) is responsible for reading them at the
// right time and for keeping two moves from writing the same port in one
// cycle (checked by assertions).
//
// Stalls: a FIFO read or peek on an empty FIFO, or a FIFO write to a full
// one, freezes the whole core (global lock) until the FIFO allows the
// operation. Everything else is statically scheduled.
//
// Interface: the instruction memory and data memory are outside (see
// tta_proc); the instruction word for the current cycle arrives on `instr`
// one cycle after `imem_addr`. FIFO ports are arrays indexed by the actor's
// input and output number. With NIN = 0 (or NOUT = 0) one unused port is
// still present.
//
// The unit set, bus count and register-file sizes follow the serialize
// processor of the original design; the encoding, the latencies, the delay slot and
// the stall on FIFO empty/full are this design's choices.
module tta_core
  import tta_pkg::*;
#(
  parameter int unsigned NUM_BUSES = 2,
  parameter int unsigned NIN       = 1,
  parameter int unsigned NOUT      = 1,
  parameter int unsigned IW        = 10,      // instruction address bits
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned DAW       = (DMEM_WORDS > 1) ? $clog2(DMEM_WORDS) : 1,
  parameter int unsigned RF_REGS   = 12,
  parameter int unsigned BOOL_REGS = 2,
  parameter int unsigned CW        = 9,       // FIFO level width
  localparam int unsigned NIN_P    = (NIN  > 0) ? NIN  : 1,
  localparam int unsigned NOUT_P   = (NOUT > 0) ? NOUT : 1,
  localparam int unsigned INSTR_W  = NUM_BUSES * SLOT_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          run,
  // instruction memory
  output logic                          imem_en,
  output logic [IW-1:0]                 imem_addr,
  input  logic [INSTR_W-1:0]            instr,
  // data memory
  output logic                          dmem_en,
  output logic [3:0]                    dmem_be,
  output logic [DAW-1:0]                dmem_addr,
  output logic [31:0]                   dmem_wdata,
  input  logic [31:0]                   dmem_rdata,
  // input FIFOs
  input  logic [NIN_P-1:0][31:0]        in_rdata,
  input  logic [NIN_P-1:0]              in_empty,
  input  logic [NIN_P-1:0][CW-1:0]      in_count,
  output logic [NIN_P-1:0]              in_pop,
  // output FIFOs
  input  logic [NOUT_P-1:0]             out_full,
  input  logic [NOUT_P-1:0][CW-1:0]     out_free,
  output logic [NOUT_P-1:0]             out_push,
  output logic [NOUT_P-1:0][31:0]       out_wdata,
  // status
  output logic                          stalled
);
  localparam int unsigned RAW = $clog2(RF_REGS);
  localparam int unsigned BAW = (BOOL_REGS > 1) ? $clog2(BOOL_REGS) : 1;

  // ------------------------------------------------------------------
  // Decode
  // ------------------------------------------------------------------
  slot_t                 slot      [NUM_BUSES];
  logic                  move      [NUM_BUSES];   // slot moves this cycle
  logic [UNIT_W-1:0]     dunit     [NUM_BUSES];
  logic [SUB_W-1:0]      dsub      [NUM_BUSES];
  logic [UNIT_W-1:0]     sunit     [NUM_BUSES];
  logic [SUB_W-1:0]      ssub      [NUM_BUSES];
  logic [31:0]           bus       [NUM_BUSES];
  logic                  exec_valid;
  logic                  en;
  logic [BOOL_REGS-1:0][0:0] bool_regs;

  always_comb begin
    for (int b = 0; b < NUM_BUSES; b++) begin
      logic g;
      slot[b]  = slot_t'(instr[b*SLOT_W +: SLOT_W]);
      dunit[b] = slot[b].dst[PORT_W-1:SUB_W];
      dsub[b]  = slot[b].dst[SUB_W-1:0];
      sunit[b] = slot[b].src[PORT_W-1:SUB_W];
      ssub[b]  = slot[b].src[SUB_W-1:0];
      unique case (slot[b].guard)
        G_ALWAYS: g = 1'b1;
        G_B0:     g = bool_regs[0][0];
        G_NB0:    g = !bool_regs[0][0];
        G_B1:     g = bool_regs[BOOL_REGS-1][0];
        G_NB1:    g = !bool_regs[BOOL_REGS-1][0];
        default:  g = 1'b0;
      endcase
      move[b] = exec_valid && g && (dunit[b] != U_NONE);
    end
  end

  // ------------------------------------------------------------------
  // Register-file read sockets: one read port per file, addressed by the
  // first bus that reads the file.
  // ------------------------------------------------------------------
  logic [RAW-1:0] rf1_raddr, rf2_raddr;
  logic [BAW-1:0] bool_raddr;
  logic [31:0]    rf1_rdata, rf2_rdata;
  logic [0:0]     bool_rdata;

  always_comb begin
    rf1_raddr  = '0;
    rf2_raddr  = '0;
    bool_raddr = '0;
    for (int b = NUM_BUSES - 1; b >= 0; b--) begin
      if (!slot[b].imm && sunit[b] == U_RF1)  rf1_raddr  = RAW'(ssub[b]);
      if (!slot[b].imm && sunit[b] == U_RF2)  rf2_raddr  = RAW'(ssub[b]);
      if (!slot[b].imm && sunit[b] == U_BOOL) bool_raddr = BAW'(ssub[b]);
    end
  end

  // ------------------------------------------------------------------
  // Unit results and the source multiplexers of the buses
  // ------------------------------------------------------------------
  logic [31:0] alu_res, lsu_res, log_res, ra;
  logic [NIN_P-1:0][31:0]  sin_res;
  logic [NOUT_P-1:0][31:0] sout_res;

  always_comb begin
    for (int b = 0; b < NUM_BUSES; b++) begin
      bus[b] = '0;
      if (slot[b].imm) bus[b] = 32'($signed(slot[b].src));
      else begin
        unique case (sunit[b])
          U_ALU:   bus[b] = alu_res;
          U_LSU:   bus[b] = lsu_res;
          U_LOGIC: bus[b] = log_res;
          U_BOOL:  bus[b] = 32'(bool_rdata);
          U_RF1:   bus[b] = rf1_rdata;
          U_RF2:   bus[b] = rf2_rdata;
          U_GCU:   bus[b] = ra;
          default: begin
            for (int k = 0; k < NIN; k++)
              if (32'(sunit[b]) == 32'(U_STREAM_BASE) + k) bus[b] = sin_res[k];
            for (int k = 0; k < NOUT; k++)
              if (32'(sunit[b]) == 32'(U_STREAM_BASE) + NIN + k) bus[b] = sout_res[k];
          end
        endcase
      end
    end
  end

  // ------------------------------------------------------------------
  // Destination sockets: gather the moves into each unit's ports
  // ------------------------------------------------------------------
  typedef struct packed {
    logic        we;
    logic [SUB_W-1:0] sub;
    logic [31:0] data;
  } wport_t;

  // operand port (sub 0) and trigger port (sub != 0) of a unit
  function automatic wport_t opnd_port(input logic [UNIT_W-1:0] u,
                                       input logic mvs [NUM_BUSES],
                                       input logic [UNIT_W-1:0] du [NUM_BUSES],
                                       input logic [SUB_W-1:0]  ds [NUM_BUSES],
                                       input logic [31:0]       bv [NUM_BUSES]);
    wport_t p = '0;
    for (int b = 0; b < NUM_BUSES; b++)
      if (mvs[b] && du[b] == u && ds[b] == '0) begin
        p.we = 1'b1; p.sub = ds[b]; p.data = bv[b];
      end
    return p;
  endfunction

  function automatic wport_t trig_port(input logic [UNIT_W-1:0] u,
                                       input logic mvs [NUM_BUSES],
                                       input logic [UNIT_W-1:0] du [NUM_BUSES],
                                       input logic [SUB_W-1:0]  ds [NUM_BUSES],
                                       input logic [31:0]       bv [NUM_BUSES]);
    wport_t p = '0;
    for (int b = 0; b < NUM_BUSES; b++)
      if (mvs[b] && du[b] == u && ds[b] != '0) begin
        p.we = 1'b1; p.sub = ds[b]; p.data = bv[b];
      end
    return p;
  endfunction

  // any port of a unit (register files: sub is the register index)
  function automatic wport_t any_port(input logic [UNIT_W-1:0] u,
                                      input logic mvs [NUM_BUSES],
                                      input logic [UNIT_W-1:0] du [NUM_BUSES],
                                      input logic [SUB_W-1:0]  ds [NUM_BUSES],
                                      input logic [31:0]       bv [NUM_BUSES]);
    wport_t p = '0;
    for (int b = 0; b < NUM_BUSES; b++)
      if (mvs[b] && du[b] == u) begin
        p.we = 1'b1; p.sub = ds[b]; p.data = bv[b];
      end
    return p;
  endfunction

  wport_t alu_o, alu_t, lsu_o, lsu_t, log_o, log_t, gcu_o, gcu_t;
  wport_t rf1_w, rf2_w, bool_w;
  wport_t sin_t  [NIN_P];
  wport_t sout_t [NOUT_P];

  always_comb begin
    alu_o  = opnd_port(U_ALU,   move, dunit, dsub, bus);
    alu_t  = trig_port(U_ALU,   move, dunit, dsub, bus);
    lsu_o  = opnd_port(U_LSU,   move, dunit, dsub, bus);
    lsu_t  = trig_port(U_LSU,   move, dunit, dsub, bus);
    log_o  = opnd_port(U_LOGIC, move, dunit, dsub, bus);
    log_t  = trig_port(U_LOGIC, move, dunit, dsub, bus);
    gcu_o  = opnd_port(U_GCU,   move, dunit, dsub, bus);
    gcu_t  = trig_port(U_GCU,   move, dunit, dsub, bus);
    rf1_w  = any_port(U_RF1,    move, dunit, dsub, bus);
    rf2_w  = any_port(U_RF2,    move, dunit, dsub, bus);
    bool_w = any_port(U_BOOL,   move, dunit, dsub, bus);
    for (int k = 0; k < NIN_P; k++)
      sin_t[k] = (k < NIN) ? trig_port(UNIT_W'(32'(U_STREAM_BASE) + k), move, dunit, dsub, bus) : '0;
    for (int k = 0; k < NOUT_P; k++)
      sout_t[k] = (k < NOUT) ? trig_port(UNIT_W'(32'(U_STREAM_BASE) + NIN + k), move, dunit, dsub, bus) : '0;
  end

  // ------------------------------------------------------------------
  // Global lock
  // ------------------------------------------------------------------
  logic [NIN_P-1:0]  sin_stall;
  logic [NOUT_P-1:0] sout_stall;
  assign stalled = (|sin_stall) || (|sout_stall);
  assign en      = !stalled;

  // ------------------------------------------------------------------
  // Units
  // ------------------------------------------------------------------
  alu_fu u_alu (
    .clk, .rst_n, .en,
    .opnd_we(alu_o.we), .opnd_in(alu_o.data),
    .trigger(alu_t.we), .op(alu_op_e'(alu_t.sub)), .trig_in(alu_t.data),
    .result(alu_res)
  );

  logic_fu u_logic (
    .clk, .rst_n, .en,
    .opnd_we(log_o.we), .opnd_in(log_o.data),
    .trigger(log_t.we), .op(logic_op_e'(log_t.sub)), .trig_in(log_t.data),
    .result(log_res)
  );

  lsu_fu #(.DEPTH(DMEM_WORDS), .AW(DAW)) u_lsu (
    .clk, .rst_n, .en,
    .opnd_we(lsu_o.we), .opnd_in(lsu_o.data),
    .trigger(lsu_t.we), .op(lsu_op_e'(lsu_t.sub)), .trig_in(lsu_t.data),
    .result(lsu_res),
    .dmem_en, .dmem_be, .dmem_addr, .dmem_wdata, .dmem_rdata
  );

  logic [RF_REGS-1:0][31:0] rf1_regs, rf2_regs;

  reg_file #(.W(32), .REGS(RF_REGS)) u_rf1 (
    .clk, .rst_n, .en,
    .we(rf1_w.we), .waddr(RAW'(rf1_w.sub)), .wdata(rf1_w.data),
    .raddr(rf1_raddr), .rdata(rf1_rdata), .regs(rf1_regs)
  );

  reg_file #(.W(32), .REGS(RF_REGS)) u_rf2 (
    .clk, .rst_n, .en,
    .we(rf2_w.we), .waddr(RAW'(rf2_w.sub)), .wdata(rf2_w.data),
    .raddr(rf2_raddr), .rdata(rf2_rdata), .regs(rf2_regs)
  );

  reg_file #(.W(1), .REGS(BOOL_REGS)) u_bool (
    .clk, .rst_n, .en,
    .we(bool_w.we), .waddr(BAW'(bool_w.sub)), .wdata(bool_w.data[0]),
    .raddr(bool_raddr), .rdata(bool_rdata), .regs(bool_regs)
  );

  gcu #(.IW(IW)) u_gcu (
    .clk, .rst_n, .run, .en,
    .trigger(gcu_t.we), .op(gcu_op_e'(gcu_t.sub)), .target(gcu_t.data),
    .ra_we(gcu_o.we), .ra_in(gcu_o.data), .ra,
    .imem_en, .imem_addr, .exec_valid
  );

  for (genvar k = 0; k < NIN_P; k++) begin : g_sin
    if (k < NIN) begin : g_fu
      fifo_read_fu #(.W(32), .CW(CW)) u_sin (
        .clk, .rst_n, .en,
        .trigger(sin_t[k].we), .op(sin_op_e'(sin_t[k].sub)),
        .stall_req(sin_stall[k]), .result(sin_res[k]),
        .fifo_rdata(in_rdata[k]), .fifo_empty(in_empty[k]),
        .fifo_count(in_count[k]), .fifo_pop(in_pop[k])
      );
    end else begin : g_none
      assign sin_stall[k] = 1'b0;
      assign sin_res[k]   = '0;
      assign in_pop[k]    = 1'b0;
    end
  end

  for (genvar k = 0; k < NOUT_P; k++) begin : g_sout
    if (k < NOUT) begin : g_fu
      fifo_write_fu #(.W(32), .CW(CW)) u_sout (
        .clk, .rst_n, .en,
        .trigger(sout_t[k].we), .op(sout_op_e'(sout_t[k].sub)),
        .data(sout_t[k].data),
        .stall_req(sout_stall[k]), .result(sout_res[k]),
        .fifo_full(out_full[k]), .fifo_free(out_free[k]),
        .fifo_push(out_push[k]), .fifo_wdata(out_wdata[k])
      );
    end else begin : g_none
      assign sout_stall[k] = 1'b0;
      assign sout_res[k]   = '0;
      assign out_push[k]   = 1'b0;
      assign out_wdata[k]  = '0;
    end
  end

  // ------------------------------------------------------------------
  // Scheduling rules of the program
  // ------------------------------------------------------------------
  always_comb begin
    for (int b1 = 0; b1 < NUM_BUSES; b1++)
      for (int b2 = b1 + 1; b2 < NUM_BUSES; b2++) begin
        if (rst_n && move[b1] && move[b2] && dunit[b1] == dunit[b2])
          a_one_write: assert (dsub[b1] != dsub[b2] &&
                               !(dunit[b1] inside {U_RF1, U_RF2, U_BOOL}) &&
                               !(dsub[b1] != '0 && dsub[b2] != '0))
            else $error("two moves write the same port of unit %0d", dunit[b1]);
        if (rst_n && exec_valid && !slot[b1].imm && !slot[b2].imm &&
            sunit[b1] == sunit[b2] && (sunit[b1] inside {U_RF1, U_RF2, U_BOOL}))
          a_one_read: assert (ssub[b1] == ssub[b2])
            else $error("two registers of file %0d read in one cycle", sunit[b1]);
      end
  end
endmodule
