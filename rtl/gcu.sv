// gcu: the global control unit of a TTA processor: program counter,
// instruction fetch and control flow (jump, call).
//
// The instruction memory is synchronous. In every unlocked cycle the GCU
// fetches the word at `fetch_pc` and advances it; the fetched word is
// executed in the next cycle (`exec_valid` says there is one). Writing the
// trigger port with `jump` or `call` redirects the fetch: because the word
// after the jump is already being fetched, it is executed as a single delay
// slot. `call` also stores the return address (the word after the delay slot)
// in the RA register, which the program can read and write through the RA
// port; `jump` to the RA value returns. Jump targets are instruction indices.
//
// `run` low holds the processor at the start of its program (used while the
// memories are loaded). `en` low (global lock) freezes the unit.
// The fetch organisation and the single delay slot are this design's choice.
module gcu
  import tta_pkg::*;
#(
  parameter int unsigned IW = 10     // instruction address width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          en,
  input  logic          trigger,
  input  gcu_op_e       op,
  input  logic [31:0]   target,
  input  logic          ra_we,
  input  logic [31:0]   ra_in,
  output logic [31:0]   ra,
  output logic          imem_en,
  output logic [IW-1:0] imem_addr,
  output logic          exec_valid
);
  logic [IW-1:0] fetch_pc_q;
  logic          jump_now;

  assign jump_now  = trigger && (op == GCU_JUMP || op == GCU_CALL);
  assign imem_en   = run && en;
  assign imem_addr = fetch_pc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetch_pc_q <= '0;
      exec_valid <= 1'b0;
      ra         <= '0;
    end else if (!run) begin
      fetch_pc_q <= '0;
      exec_valid <= 1'b0;
    end else if (en) begin
      exec_valid <= 1'b1;
      fetch_pc_q <= jump_now ? target[IW-1:0] : fetch_pc_q + 1'b1;
      if (trigger && op == GCU_CALL) ra <= 32'(fetch_pc_q) + 32'd1;
      else if (ra_we)                ra <= ra_in;
    end
  end
endmodule
