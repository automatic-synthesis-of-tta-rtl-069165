// fifo_write_fu: the "FIFO write" (STREAM_OUT) function unit of a TTA
// processor.
//
// It connects one output FIFO of an actor to the processor's transport buses
// and offers two operations, selected by the trigger port written:
//   write  - pushes the trigger value into the FIFO (no result)
//   status - returns the number of free places in the FIFO (latency 1)
// What `status` counts for the write side is this design's choice; the
// original design only names the operation.
//
// A write triggered while the FIFO is full raises `stall_req`
// combinationally; the core freezes (global lock) until a place is free and
// the push then happens in the cycle the lock is released.
module fifo_write_fu
  import tta_pkg::*;
#(
  parameter int unsigned W  = 32,
  parameter int unsigned CW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          trigger,
  input  sout_op_e      op,
  input  logic [W-1:0]  data,
  output logic          stall_req,
  output logic [W-1:0]  result,
  // FIFO side
  input  logic          fifo_full,
  input  logic [CW-1:0] fifo_free,
  output logic          fifo_push,
  output logic [W-1:0]  fifo_wdata
);
  assign stall_req  = trigger && (op == SOUT_WRITE) && fifo_full;
  assign fifo_push  = en && trigger && (op == SOUT_WRITE) && !fifo_full;
  assign fifo_wdata = data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) result <= '0;
    else if (en && trigger && op == SOUT_STATUS) result <= W'(fifo_free);
  end
endmodule
