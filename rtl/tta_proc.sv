// tta_proc: one processor of the network together with its private memories.
//
// Every actor of the dataflow program runs on its own processor, and each
// processor owns an instruction memory and a data memory sized for that
// actor's program (so memories differ from processor to processor). This
// envelope puts the core (tta_core) and both memories into one block that the
// network top instantiates once per actor.
//
// Memories: synchronous, one cycle read latency, written as arrays so that
// synthesis maps them to on-chip RAM. The instruction memory is
// IMEM_WORDS x (NUM_BUSES x 30) bits; the data memory DMEM_WORDS x 32 bits
// with byte write enables. Both can be written through the load port
// (`load_sel` 0: instruction memory, 1: data memory; the data word is the low
// bits of `load_data`), which stands in for the memory images that are
// otherwise built into the FPGA bitstream. A load write to the data memory
// takes priority over a store of the core in the same cycle. Hold `run` low
// while loading; when it rises the processor starts at instruction 0.
module tta_proc
  import tta_pkg::*;
#(
  parameter int unsigned NUM_BUSES  = 2,
  parameter int unsigned NIN        = 1,
  parameter int unsigned NOUT       = 1,
  parameter int unsigned IMEM_WORDS = 29,
  parameter int unsigned DMEM_WORDS = 87,
  parameter int unsigned CW         = 9,
  localparam int unsigned NIN_P     = (NIN  > 0) ? NIN  : 1,
  localparam int unsigned NOUT_P    = (NOUT > 0) ? NOUT : 1,
  localparam int unsigned INSTR_W   = NUM_BUSES * SLOT_W,
  localparam int unsigned IW        = (IMEM_WORDS > 1) ? $clog2(IMEM_WORDS) : 1,
  localparam int unsigned DAW       = (DMEM_WORDS > 1) ? $clog2(DMEM_WORDS) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        run,
  // memory load port
  input  logic                        load_we,
  input  logic                        load_sel,
  input  logic [15:0]                 load_addr,
  input  logic [MAX_BUSES*SLOT_W-1:0] load_data,
  // input FIFOs
  input  logic [NIN_P-1:0][31:0]      in_rdata,
  input  logic [NIN_P-1:0]            in_empty,
  input  logic [NIN_P-1:0][CW-1:0]    in_count,
  output logic [NIN_P-1:0]            in_pop,
  // output FIFOs
  input  logic [NOUT_P-1:0]           out_full,
  input  logic [NOUT_P-1:0][CW-1:0]   out_free,
  output logic [NOUT_P-1:0]           out_push,
  output logic [NOUT_P-1:0][31:0]     out_wdata,
  output logic                        stalled
);
  logic [INSTR_W-1:0] imem [IMEM_WORDS];
  logic [31:0]        dmem [DMEM_WORDS];

  logic               imem_en;
  logic [IW-1:0]      imem_addr;
  logic [INSTR_W-1:0] instr;
  logic               dmem_en;
  logic [3:0]         dmem_be;
  logic [DAW-1:0]     dmem_addr;
  logic [31:0]        dmem_wdata, dmem_rdata;

  // instruction memory
  always_ff @(posedge clk) begin
    if (load_we && !load_sel && 32'(load_addr) < IMEM_WORDS)
      imem[load_addr[IW-1:0]] <= load_data[INSTR_W-1:0];
    if (imem_en)
      instr <= (32'(imem_addr) < IMEM_WORDS) ? imem[imem_addr] : '0;
  end

  // data memory
  always_ff @(posedge clk) begin
    if (load_we && load_sel) begin
      if (32'(load_addr) < DMEM_WORDS) dmem[load_addr[DAW-1:0]] <= load_data[31:0];
    end else if (dmem_en && 32'(dmem_addr) < DMEM_WORDS) begin
      for (int i = 0; i < 4; i++)
        if (dmem_be[i]) dmem[dmem_addr][8*i +: 8] <= dmem_wdata[8*i +: 8];
    end
    if (dmem_en)
      dmem_rdata <= (32'(dmem_addr) < DMEM_WORDS) ? dmem[dmem_addr] : '0;
  end

  tta_core #(
    .NUM_BUSES(NUM_BUSES), .NIN(NIN), .NOUT(NOUT), .IW(IW),
    .DMEM_WORDS(DMEM_WORDS), .DAW(DAW), .CW(CW)
  ) u_core (
    .clk, .rst_n, .run,
    .imem_en, .imem_addr, .instr,
    .dmem_en, .dmem_be, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .in_rdata, .in_empty, .in_count, .in_pop,
    .out_full, .out_free, .out_push, .out_wdata,
    .stalled
  );
endmodule
