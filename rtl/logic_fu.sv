// logic_fu: the bitwise LOGIC function unit of a TTA processor (and, ior,
// xor). Operand port plus trigger port as in every TTA function unit; the
// operand written by the same instruction as the trigger is used. The result
// can be read by the next instruction (latency 1).
module logic_fu
  import tta_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         opnd_we,
  input  logic [W-1:0] opnd_in,
  input  logic         trigger,
  input  logic_op_e    op,
  input  logic [W-1:0] trig_in,
  output logic [W-1:0] result
);
  logic [W-1:0] opnd_q, a, y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) opnd_q <= '0;
    else if (en && opnd_we) opnd_q <= opnd_in;
  end

  assign a = opnd_we ? opnd_in : opnd_q;

  always_comb begin
    unique case (op)
      LOG_AND: y = a & trig_in;
      LOG_IOR: y = a | trig_in;
      LOG_XOR: y = a ^ trig_in;
      default: y = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) result <= '0;
    else if (en && trigger) result <= y;
  end
endmodule
