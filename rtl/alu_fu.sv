// alu_fu: the arithmetic function unit (ALU) of a TTA processor.
//
// Two input ports: the operand port (sub 0) is a register that only stores a
// value; writing the trigger port with an opcode starts the operation on
// (operand, trigger value). If the operand and the trigger are written by the
// same instruction, the new operand is used. The result register can be read
// by the next instruction (latency 1).
//
// Operations named on the unit in the serialize processor are add, and, eq,
// gt, gtu, ior and shl; the rest of its list is elided, so sub, xor, shr,
// shru, sxqw and sxhw (sign extension of a byte or half-word of the trigger
// value) are this design's completion of the set. Comparisons return 0 or 1;
// shifts use the low 5 bits of the trigger value.
module alu_fu
  import tta_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         opnd_we,   // operand port written this cycle
  input  logic [W-1:0] opnd_in,
  input  logic         trigger,   // trigger port written this cycle
  input  alu_op_e      op,
  input  logic [W-1:0] trig_in,
  output logic [W-1:0] result
);
  logic [W-1:0] opnd_q, a, b, y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) opnd_q <= '0;
    else if (en && opnd_we) opnd_q <= opnd_in;
  end

  assign a = opnd_we ? opnd_in : opnd_q;
  assign b = trig_in;

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_IOR:  y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_EQ:   y = W'(a == b);
      ALU_GT:   y = W'($signed(a) > $signed(b));
      ALU_GTU:  y = W'(a > b);
      ALU_SHL:  y = a << b[4:0];
      ALU_SHR:  y = W'($signed(a) >>> b[4:0]);
      ALU_SHRU: y = a >> b[4:0];
      ALU_SXQW: y = W'($signed(b[7:0]));
      ALU_SXHW: y = W'($signed(b[15:0]));
      default:  y = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) result <= '0;
    else if (en && trigger) result <= y;
  end
endmodule
