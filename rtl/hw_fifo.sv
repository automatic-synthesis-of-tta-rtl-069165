// hw_fifo: the hardware FIFO buffer that joins two processors of the network.
//
// Each arrow between two actors of the dataflow network becomes one of these
// buffers. The producer's FIFO write unit pushes tokens, the consumer's FIFO
// read unit pops them, and both units read the fill level for their `status`
// instruction. The head token is always visible on `rdata` so that the read
// unit can `peek` without popping.
//
// Implementation (this design's choice; the buffers are only described by
// what they do): a circular buffer of DEPTH words with a read pointer, a
// write pointer and an occupancy counter. A push when full and a pop when
// empty are ignored (the function units never issue them). Push and pop may
// happen in the same cycle. Depth 256 x 32 bits fills one 1 kB on-chip
// memory block. A pushed token is visible to the consumer one cycle later.
module hw_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 256
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // producer side
  input  logic                       push,
  input  logic [WIDTH-1:0]           wdata,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] free,
  // consumer side
  input  logic                       pop,
  output logic [WIDTH-1:0]           rdata,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rptr, wptr;
  logic [CW-1:0]    cnt;

  logic do_push, do_pop;
  assign do_push = push && (cnt != CW'(DEPTH));
  assign do_pop  = pop && (cnt != '0);

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr <= '0;
      wptr <= '0;
      cnt  <= '0;
    end else begin
      if (do_push) wptr <= incr(wptr);
      if (do_pop)  rptr <= incr(rptr);
      cnt <= cnt + CW'(do_push) - CW'(do_pop);
    end
  end

  assign rdata = mem[rptr];
  assign count = cnt;
  assign free  = CW'(DEPTH) - cnt;
  assign empty = (cnt == '0);
  assign full  = (cnt == CW'(DEPTH));

  // The function units must never push into a full or pop from an empty FIFO.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop  |-> !empty);
endmodule
