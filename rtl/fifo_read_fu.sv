// fifo_read_fu: the "FIFO read" (STREAM_IN) function unit of a TTA processor.
//
// It connects one input FIFO of an actor to the processor's transport buses
// and offers three operations, selected by the trigger port written:
//   status - returns the number of tokens waiting in the FIFO
//   read   - pops the head token and returns it
//   peek   - returns the head token without popping it
// The trigger value itself is not used. Operations have latencies of 1
// (status), 2 (peek) and 3 (read) cycles: the result can be read by the
// instruction executed that many cycles after the trigger. The original design gives
// the range 1..3 cycles; the split over the operations is this design's own.
//
// A read or peek triggered while the FIFO is empty cannot complete. The unit
// raises `stall_req` combinationally so the core freezes (global lock, `en`
// low) until a token arrives; the pop then happens in the cycle the lock is
// released. How an empty FIFO is handled is this design's choice.
module fifo_read_fu
  import tta_pkg::*;
#(
  parameter int unsigned W  = 32,
  parameter int unsigned CW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,        // global lock released
  input  logic          trigger,   // trigger port written this cycle
  input  sin_op_e       op,
  output logic          stall_req,
  output logic [W-1:0]  result,
  // FIFO side
  input  logic [W-1:0]  fifo_rdata,
  input  logic          fifo_empty,
  input  logic [CW-1:0] fifo_count,
  output logic          fifo_pop
);
  logic needs_token;
  logic start;
  logic [1:0] lat;
  logic [W-1:0] value;

  assign needs_token = trigger && (op == SIN_READ || op == SIN_PEEK);
  assign stall_req   = needs_token && fifo_empty;
  assign start       = trigger && (op != SIN_NONE);
  assign fifo_pop    = en && trigger && (op == SIN_READ) && !fifo_empty;

  always_comb begin
    unique case (op)
      SIN_STATUS: begin lat = 2'(LAT_SIN_STATUS); value = W'(fifo_count); end
      SIN_PEEK:   begin lat = 2'(LAT_SIN_PEEK);   value = fifo_rdata; end
      SIN_READ:   begin lat = 2'(LAT_SIN_READ);   value = fifo_rdata; end
      default:    begin lat = 2'd1;               value = '0; end
    endcase
  end

  fu_result_pipe #(.W(W), .MAXLAT(3)) u_res (
    .clk, .rst_n, .en, .start, .lat, .value, .result
  );
endmodule
