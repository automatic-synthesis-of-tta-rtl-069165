// tta_pkg: types, constants and encoding helpers shared by the TTA processor
// network.
//
// A transport-triggered processor has a single instruction, the move. One
// instruction word holds one move slot per transport bus. Each slot names a
// guard, a source (a function-unit result, a register, or a short immediate)
// and a destination (an operand or trigger port of a function unit, or a
// register). Writing a trigger port starts an operation; the opcode is part of
// the destination field, so no separate opcode slot is needed.
//
// The slot layout below is this design's own choice (the processors of the
// network are described at the level of buses, function units and register
// files, not bit fields):
//
//   [29:27] guard   0 always, 1 b0, 2 !b0, 3 b1, 4 !b1 (bits of the BOOL file)
//   [26]    imm     1: the source field is a 16-bit signed immediate
//   [25:10] src     {6'b0, unit[5:0], sub[3:0]} or the immediate
//   [9:0]   dst     {unit[5:0], sub[3:0]}; unit 0 means "no move"
//
// Unit numbers: 1 ALU, 2 LSU, 3 LOGIC, 4 BOOL, 5 RF_1, 6 RF_2, 7 GCU,
// then the FIFO read units (STREAM_IN) and after them the FIFO write units
// (STREAM_OUT) of the processor.
//
// The package also holds the actor network of the MPEG-4 Simple Profile
// decoder (21 processors and the FIFOs between them) and the per-processor
// memory sizes and bus counts used by the network top.
package tta_pkg;

  localparam int unsigned WORD_W  = 32;
  localparam int unsigned SLOT_W  = 30;
  localparam int unsigned UNIT_W  = 6;
  localparam int unsigned SUB_W   = 4;
  localparam int unsigned PORT_W  = UNIT_W + SUB_W;
  localparam int unsigned IMM_W   = 16;
  localparam int unsigned MAX_BUSES = 6;

  // Unit numbers
  localparam logic [UNIT_W-1:0] U_NONE  = 6'd0;
  localparam logic [UNIT_W-1:0] U_ALU   = 6'd1;
  localparam logic [UNIT_W-1:0] U_LSU   = 6'd2;
  localparam logic [UNIT_W-1:0] U_LOGIC = 6'd3;
  localparam logic [UNIT_W-1:0] U_BOOL  = 6'd4;
  localparam logic [UNIT_W-1:0] U_RF1   = 6'd5;
  localparam logic [UNIT_W-1:0] U_RF2   = 6'd6;
  localparam logic [UNIT_W-1:0] U_GCU   = 6'd7;
  localparam logic [UNIT_W-1:0] U_STREAM_BASE = 6'd8;

  // Guards
  typedef enum logic [2:0] {
    G_ALWAYS = 3'd0, G_B0 = 3'd1, G_NB0 = 3'd2, G_B1 = 3'd3, G_NB1 = 3'd4
  } guard_e;

  // ALU trigger opcodes (sub field; sub 0 is the operand port)
  typedef enum logic [SUB_W-1:0] {
    ALU_OPND = 4'd0,
    ALU_ADD  = 4'd1, ALU_SUB  = 4'd2, ALU_AND  = 4'd3, ALU_IOR  = 4'd4,
    ALU_XOR  = 4'd5, ALU_EQ   = 4'd6, ALU_GT   = 4'd7, ALU_GTU  = 4'd8,
    ALU_SHL  = 4'd9, ALU_SHR  = 4'd10, ALU_SHRU = 4'd11,
    ALU_SXQW = 4'd12, ALU_SXHW = 4'd13
  } alu_op_e;

  // LOGIC trigger opcodes
  typedef enum logic [SUB_W-1:0] {
    LOG_OPND = 4'd0, LOG_AND = 4'd1, LOG_IOR = 4'd2, LOG_XOR = 4'd3
  } logic_op_e;

  // LSU trigger opcodes (trigger value is the byte address)
  typedef enum logic [SUB_W-1:0] {
    LSU_OPND = 4'd0,
    LSU_LDW  = 4'd1, LSU_LDH  = 4'd2, LSU_LDHU = 4'd3, LSU_LDQ  = 4'd4,
    LSU_LDQU = 4'd5, LSU_STW  = 4'd6, LSU_STH  = 4'd7, LSU_STQ  = 4'd8
  } lsu_op_e;

  // GCU ports
  typedef enum logic [SUB_W-1:0] {
    GCU_RA = 4'd0, GCU_JUMP = 4'd1, GCU_CALL = 4'd2
  } gcu_op_e;

  // FIFO read unit (STREAM_IN) opcodes
  typedef enum logic [SUB_W-1:0] {
    SIN_NONE = 4'd0, SIN_STATUS = 4'd1, SIN_READ = 4'd2, SIN_PEEK = 4'd3
  } sin_op_e;

  // FIFO write unit (STREAM_OUT) opcodes
  typedef enum logic [SUB_W-1:0] {
    SOUT_NONE = 4'd0, SOUT_STATUS = 4'd1, SOUT_WRITE = 4'd2
  } sout_op_e;

  // Operation latencies in cycles: a result triggered in cycle t can be
  // read by the instruction executed in cycle t + latency.
  localparam int unsigned LAT_ALU        = 1;
  localparam int unsigned LAT_LOGIC      = 1;
  localparam int unsigned LAT_LSU        = 2;
  localparam int unsigned LAT_SIN_STATUS = 1;
  localparam int unsigned LAT_SIN_PEEK   = 2;
  localparam int unsigned LAT_SIN_READ   = 3;
  localparam int unsigned LAT_SOUT_STATUS = 1;

  typedef struct packed {
    logic [2:0]        guard;
    logic              imm;
    logic [IMM_W-1:0]  src;
    logic [PORT_W-1:0] dst;
  } slot_t;

  // ---------------------------------------------------------------------
  // Encoding helpers (used by program generators and testbenches)
  // ---------------------------------------------------------------------
  function automatic logic [PORT_W-1:0] port(input logic [UNIT_W-1:0] unit,
                                             input logic [SUB_W-1:0] sub);
    return {unit, sub};
  endfunction

  // move from a unit port to a unit port
  function automatic slot_t mv(input logic [PORT_W-1:0] src,
                               input logic [PORT_W-1:0] dst,
                               input guard_e g = G_ALWAYS);
    slot_t s;
    s.guard = g;
    s.imm   = 1'b0;
    s.src   = {{(IMM_W-PORT_W){1'b0}}, src};
    s.dst   = dst;
    return s;
  endfunction

  // move of a signed 16-bit immediate to a unit port
  function automatic slot_t mvi(input int value,
                                input logic [PORT_W-1:0] dst,
                                input guard_e g = G_ALWAYS);
    slot_t s;
    s.guard = g;
    s.imm   = 1'b1;
    s.src   = value[IMM_W-1:0];
    s.dst   = dst;
    return s;
  endfunction

  function automatic slot_t nop();
    return '0;
  endfunction

  // ---------------------------------------------------------------------
  // The MPEG-4 SP decoder network: processors and FIFO edges
  // ---------------------------------------------------------------------
  localparam int unsigned NUM_PROCS = 21;

  typedef enum int unsigned {
    P_SOURCE = 0, P_SERIALIZE = 1, P_PARSER = 2, P_BCAST1 = 3, P_MVSEQ = 4,
    P_MVREC = 5, P_ADDRESS = 6, P_BUFFER = 7, P_INTERP = 8, P_ADD = 9,
    P_BCAST2 = 10, P_MERGER = 11, P_DISPLAY = 12, P_DCRADDR = 13,
    P_DCREC = 14, P_BLKEXP = 15, P_DCSPLIT = 16, P_IS = 17, P_IAP = 18,
    P_IQUANT = 19, P_IDCT2D = 20
  } proc_e;

  localparam int unsigned NUM_EDGES = 36;

  // FIFO e carries tokens from EDGE_SRC[e] to EDGE_DST[e].
  localparam int unsigned EDGE_SRC [NUM_EDGES] = '{
    P_SOURCE,   P_SERIALIZE, P_PARSER,  P_PARSER,  P_BCAST1,  P_BCAST1,
    P_MVSEQ,    P_MVREC,     P_BCAST1,  P_ADDRESS, P_ADDRESS, P_BUFFER,
    P_INTERP,   P_BCAST1,    P_BCAST2,  P_ADD,     P_BCAST2,  P_MERGER,
    P_BCAST1,   P_BCAST1,    P_DCRADDR, P_PARSER,  P_PARSER,  P_PARSER,
    P_BCAST1,   P_BLKEXP,    P_DCSPLIT, P_DCSPLIT, P_DCREC,   P_DCREC,
    P_DCREC,    P_DCREC,     P_IS,      P_IAP,     P_IQUANT,  P_IDCT2D
  };
  localparam int unsigned EDGE_DST [NUM_EDGES] = '{
    P_SERIALIZE, P_PARSER,   P_BCAST1,  P_MVREC,   P_MVSEQ,   P_MVREC,
    P_MVREC,     P_ADDRESS,  P_ADDRESS, P_BUFFER,  P_INTERP,  P_INTERP,
    P_ADD,       P_ADD,      P_BUFFER,  P_BCAST2,  P_MERGER,  P_DISPLAY,
    P_DCREC,     P_DCRADDR,  P_DCREC,   P_DCREC,   P_BLKEXP,  P_DISPLAY,
    P_BLKEXP,    P_DCSPLIT,  P_DCREC,   P_IS,      P_IDCT2D,  P_IQUANT,
    P_IAP,       P_IS,       P_IAP,     P_IQUANT,  P_IDCT2D,  P_ADD
  };

  // Memory sizes and bus counts of each processor (instruction words,
  // transport buses, data-memory depth in 32-bit words).
  localparam int unsigned PROC_IMEM  [NUM_PROCS] = '{
    13, 29, 3707, 53, 334, 500, 188, 107, 844, 249,
    53, 49, 1217, 569, 930, 597, 859, 154, 578, 232, 1085
  };
  localparam int unsigned PROC_BUSES [NUM_PROCS] = '{
    2, 2, 2, 2, 2, 2, 2, 2, 6, 6,
    2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 6
  };
  localparam int unsigned PROC_DMEM  [NUM_PROCS] = '{
    87, 87, 980, 87, 91, 88, 94, 22265, 118, 992,
    89, 88, 176, 97, 1117, 209, 157, 92, 203, 94, 153
  };

  function automatic int unsigned num_inputs(input int unsigned p);
    int unsigned n = 0;
    for (int e = 0; e < NUM_EDGES; e++) if (EDGE_DST[e] == p) n++;
    return n;
  endfunction

  function automatic int unsigned num_outputs(input int unsigned p);
    int unsigned n = 0;
    for (int e = 0; e < NUM_EDGES; e++) if (EDGE_SRC[e] == p) n++;
    return n;
  endfunction

  // index of the k-th FIFO entering processor p
  function automatic int unsigned in_edge(input int unsigned p, input int unsigned k);
    int unsigned n = 0;
    for (int e = 0; e < NUM_EDGES; e++)
      if (EDGE_DST[e] == p) begin
        if (n == k) return e;
        n++;
      end
    return 0;
  endfunction

  // index of the k-th FIFO leaving processor p
  function automatic int unsigned out_edge(input int unsigned p, input int unsigned k);
    int unsigned n = 0;
    for (int e = 0; e < NUM_EDGES; e++)
      if (EDGE_SRC[e] == p) begin
        if (n == k) return e;
        n++;
      end
    return 0;
  endfunction

  // position of FIFO e among the inputs of its consumer
  function automatic int unsigned edge_in_port(input int unsigned e);
    int unsigned n = 0;
    for (int i = 0; i < NUM_EDGES; i++) begin
      if (i == e) return n;
      if (EDGE_DST[i] == EDGE_DST[e]) n++;
    end
    return n;
  endfunction

  // position of FIFO e among the outputs of its producer
  function automatic int unsigned edge_out_port(input int unsigned e);
    int unsigned n = 0;
    for (int i = 0; i < NUM_EDGES; i++) begin
      if (i == e) return n;
      if (EDGE_SRC[i] == EDGE_SRC[e]) n++;
    end
    return n;
  endfunction

endpackage
