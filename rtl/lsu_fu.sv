// lsu_fu: the load/store function unit (LSU) of a TTA processor, the only
// path to the processor's private data memory.
//
// The trigger value is a byte address; the opcode in the trigger port selects
// the access: ldw, ldh, ldhu, ldq, ldqu (word, half-word, byte; signed or
// zero-extended) and stw, sth, stq. The store data comes from the operand
// port (the value written in the same instruction is used). Byte order is
// little-endian and half-words and words are expected to be aligned; both are
// this design's choices.
//
// Timing: the memory is synchronous with one cycle of read latency, and the
// load result is registered once more, so a load triggered in cycle t can be
// read by the instruction of cycle t+2. Stores complete at the end of the
// trigger cycle. `en` low (global lock) freezes the unit; the memory holds its
// read data while it is not enabled.
module lsu_fu
  import tta_pkg::*;
#(
  parameter int unsigned W      = 32,
  parameter int unsigned DEPTH  = 1024,                 // data memory words
  parameter int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          opnd_we,
  input  logic [W-1:0]  opnd_in,
  input  logic          trigger,
  input  lsu_op_e       op,
  input  logic [W-1:0]  trig_in,
  output logic [W-1:0]  result,
  // data memory port (synchronous, 1-cycle read latency)
  output logic          dmem_en,
  output logic [3:0]    dmem_be,
  output logic [AW-1:0] dmem_addr,
  output logic [W-1:0]  dmem_wdata,
  input  logic [W-1:0]  dmem_rdata
);
  logic [W-1:0] opnd_q, sdata;
  logic         is_load, is_store;
  logic         pend_q;
  lsu_op_e      op_q;
  logic [1:0]   off_q;
  logic [1:0]   off;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) opnd_q <= '0;
    else if (en && opnd_we) opnd_q <= opnd_in;
  end
  assign sdata = opnd_we ? opnd_in : opnd_q;

  assign is_load  = trigger && (op inside {LSU_LDW, LSU_LDH, LSU_LDHU, LSU_LDQ, LSU_LDQU});
  assign is_store = trigger && (op inside {LSU_STW, LSU_STH, LSU_STQ});
  assign off      = trig_in[1:0];

  assign dmem_en   = en && (is_load || is_store);
  assign dmem_addr = trig_in[AW+1:2];

  always_comb begin
    dmem_be    = 4'b0000;
    dmem_wdata = sdata;
    if (is_store) begin
      unique case (op)
        LSU_STW: begin dmem_be = 4'b1111; dmem_wdata = sdata; end
        LSU_STH: begin
          dmem_be    = off[1] ? 4'b1100 : 4'b0011;
          dmem_wdata = {sdata[15:0], sdata[15:0]};
        end
        LSU_STQ: begin
          dmem_be    = 4'b0001 << off;
          dmem_wdata = {4{sdata[7:0]}};
        end
        default: ;
      endcase
    end
  end

  // second stage: format the loaded word
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q <= 1'b0;
      op_q   <= LSU_OPND;
      off_q  <= '0;
    end else if (en) begin
      pend_q <= is_load;
      if (is_load) begin
        op_q  <= op;
        off_q <= off;
      end
    end
  end

  logic [15:0] half;
  logic [7:0]  byte_v;
  logic [W-1:0] loaded;
  assign half   = off_q[1] ? dmem_rdata[31:16] : dmem_rdata[15:0];
  assign byte_v = dmem_rdata[8*off_q +: 8];

  always_comb begin
    unique case (op_q)
      LSU_LDH:  loaded = W'($signed(half));
      LSU_LDHU: loaded = W'(half);
      LSU_LDQ:  loaded = W'($signed(byte_v));
      LSU_LDQU: loaded = W'(byte_v);
      default:  loaded = dmem_rdata;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) result <= '0;
    else if (en && pend_q) result <= loaded;
  end
endmodule
