// reg_file: a TTA register file with one write socket and one read socket,
// as drawn for RF_1 and RF_2 (12 x 32 bits) and BOOL (2 x 1 bit) of the
// serialize processor.
//
// A register written in cycle t can be read from cycle t+1 on. Reads are
// combinational from the register array. The single read socket means a
// program may read one register of the file per instruction; with several
// buses the core may fetch that register on more than one bus (same index).
// The BOOL file's registers also drive the guards of the move slots, which
// is why all register values are brought out on `regs`. All registers reset
// to zero.
module reg_file #(
  parameter int unsigned W    = 32,
  parameter int unsigned REGS = 12
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      we,
  input  logic [$clog2(REGS)-1:0]   waddr,
  input  logic [W-1:0]              wdata,
  input  logic [$clog2(REGS)-1:0]   raddr,
  output logic [W-1:0]              rdata,
  output logic [REGS-1:0][W-1:0]    regs
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) regs <= '0;
    else if (en && we && (32'(waddr) < REGS)) regs[waddr] <= wdata;
  end

  assign rdata = (32'(raddr) < REGS) ? regs[raddr] : '0;
endmodule
