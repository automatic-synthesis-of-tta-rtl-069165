// tta_network: the processor network of the MPEG-4 Simple Profile video
// decoder, one transport-triggered processor per actor of the dataflow
// program and one hardware FIFO per connection between two actors.
//
// The 21 actors (source, serialize, parser, two broadcasts, mvseq, mvrec,
// address, buffer, interpolation, add, merger, display, dcraddr, dcrec,
// blkexp, dcsplit, is, iap, iquant, idct2d) and the 36 FIFOs between them are
// listed in tta_pkg (EDGE_SRC / EDGE_DST). Each processor gets one FIFO read
// unit per incoming FIFO and one FIFO write unit per outgoing FIFO, numbered
// in the order of the edge list. Per processor the instruction-memory size,
// bus count and data-memory depth come from the tables in tta_pkg.
//
// Data enters through the source processor, which reads it from its own data
// memory (load it through the load port before raising `run`). The display
// processor has one extra FIFO write unit whose "FIFO" is the top-level
// valid/ready output (display_valid / display_data / display_ready), standing
// for the board's general-purpose output pins.
//
// Load port: with `run` low, write instruction words (`load_sel` 0) or data
// words (`load_sel` 1) of processor `load_proc` at `load_addr`. The programs
// are the compiled actors; they are not part of the hardware.
//
// Status: `proc_stalled[p]` shows processor p waiting on an empty input or a
// full output FIFO; `fifo_full[e]` / `fifo_empty[e]` show the state of FIFO e
// (edge numbering of tta_pkg).
//
// Timing: everything runs on `clk`; a token pushed into a FIFO can be read by
// its consumer from the next cycle on. The reset is asynchronous, active low.
//
// From the original design: one processor per actor, one FIFO unit per actor
// port, the set of actors and their connections, the per-processor memory
// sizes and bus counts, the on-chip source memory and the pin output of the
// display. This design's own choices: one FIFO per connected pair of actors,
// the FIFO depth, the load port, and which memory sizes go to the processors
// other than parser and buffer.
module tta_network
  import tta_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 256,
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        run,
  // program / data load port
  input  logic                        load_we,
  input  logic [4:0]                  load_proc,
  input  logic                        load_sel,
  input  logic [15:0]                 load_addr,
  input  logic [MAX_BUSES*SLOT_W-1:0] load_data,
  // decoded output
  output logic                        display_valid,
  output logic [31:0]                 display_data,
  input  logic                        display_ready,
  // status
  output logic [NUM_PROCS-1:0]        proc_stalled,
  output logic [NUM_EDGES-1:0]        fifo_full,
  output logic [NUM_EDGES-1:0]        fifo_empty
);
  // FIFO-side signals, one per edge
  logic            f_push  [NUM_EDGES];
  logic [31:0]     f_wdata [NUM_EDGES];
  logic            f_full  [NUM_EDGES];
  logic [CW-1:0]   f_free  [NUM_EDGES];
  logic            f_pop   [NUM_EDGES];
  logic [31:0]     f_rdata [NUM_EDGES];
  logic            f_empty [NUM_EDGES];
  logic [CW-1:0]   f_count [NUM_EDGES];

  for (genvar e = 0; e < NUM_EDGES; e++) begin : g_fifo
    hw_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push(f_push[e]), .wdata(f_wdata[e]), .full(f_full[e]), .free(f_free[e]),
      .pop(f_pop[e]), .rdata(f_rdata[e]), .empty(f_empty[e]), .count(f_count[e])
    );
    assign fifo_full[e]  = f_full[e];
    assign fifo_empty[e] = f_empty[e];
  end

  for (genvar p = 0; p < NUM_PROCS; p++) begin : g_proc
    localparam int unsigned NIN    = num_inputs(p);
    localparam int unsigned NFOUT  = num_outputs(p);
    localparam bit          IS_DISP = (p == P_DISPLAY);
    localparam int unsigned NOUT   = NFOUT + (IS_DISP ? 1 : 0);
    localparam int unsigned NIN_P  = (NIN  > 0) ? NIN  : 1;
    localparam int unsigned NOUT_P = (NOUT > 0) ? NOUT : 1;

    logic [NIN_P-1:0][31:0]    in_rdata;
    logic [NIN_P-1:0]          in_empty;
    logic [NIN_P-1:0][CW-1:0]  in_count;
    logic [NIN_P-1:0]          in_pop;
    logic [NOUT_P-1:0]         out_full;
    logic [NOUT_P-1:0][CW-1:0] out_free;
    logic [NOUT_P-1:0]         out_push;
    logic [NOUT_P-1:0][31:0]   out_wdata;

    if (NIN == 0) begin : g_noin
      assign in_rdata = '0;
      assign in_empty = '1;
      assign in_count = '0;
    end
    for (genvar k = 0; k < NIN; k++) begin : g_in
      localparam int unsigned E = in_edge(p, k);
      assign in_rdata[k] = f_rdata[E];
      assign in_empty[k] = f_empty[E];
      assign in_count[k] = f_count[E];
      assign f_pop[E]    = in_pop[k];
    end
    for (genvar k = 0; k < NFOUT; k++) begin : g_out
      localparam int unsigned E = out_edge(p, k);
      assign out_full[k] = f_full[E];
      assign out_free[k] = f_free[E];
      assign f_push[E]   = out_push[k];
      assign f_wdata[E]  = out_wdata[k];
    end
    if (IS_DISP) begin : g_pins
      assign out_full[NFOUT] = !display_ready;
      assign out_free[NFOUT] = CW'(display_ready);
      assign display_valid   = out_push[NFOUT];
      assign display_data    = out_wdata[NFOUT];
    end

    tta_proc #(
      .NUM_BUSES (PROC_BUSES[p]),
      .NIN       (NIN),
      .NOUT      (NOUT),
      .IMEM_WORDS(PROC_IMEM[p]),
      .DMEM_WORDS(PROC_DMEM[p]),
      .CW        (CW)
    ) u_proc (
      .clk, .rst_n, .run,
      .load_we  (load_we && (32'(load_proc) == p)),
      .load_sel, .load_addr, .load_data,
      .in_rdata, .in_empty, .in_count, .in_pop,
      .out_full, .out_free, .out_push, .out_wdata,
      .stalled  (proc_stalled[p])
    );
  end
endmodule
