// fu_result_pipe: the result register of a TTA function unit, with a delay
// line in front of it so that operations of different latency can share it.
//
// When `start` is high in a cycle in which `en` is high, `value` appears on
// `result` `lat` cycles later (lat = 1: after the next clock edge) and is held
// there until a later result replaces it. `en` low (the processor's global
// lock) freezes the line and the register. If a new latency-1 result and an
// older delayed one arrive in the same cycle the new one wins; the program
// schedule is expected to avoid that, as in any statically scheduled machine.
module fu_result_pipe #(
  parameter int unsigned W      = 32,
  parameter int unsigned MAXLAT = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      start,
  input  logic [$clog2(MAXLAT+1)-1:0] lat,
  input  logic [W-1:0]              value,
  output logic [W-1:0]              result
);
  // stage i holds a value due to reach `result` after i more edges
  logic [W-1:0] data_q  [1:MAXLAT];
  logic         valid_q [1:MAXLAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result <= '0;
      for (int i = 1; i <= MAXLAT; i++) begin
        data_q[i]  <= '0;
        valid_q[i] <= 1'b0;
      end
    end else if (en) begin
      for (int i = 1; i < MAXLAT; i++) begin
        data_q[i]  <= data_q[i+1];
        valid_q[i] <= valid_q[i+1];
      end
      data_q[MAXLAT]  <= '0;
      valid_q[MAXLAT] <= 1'b0;
      if (valid_q[1]) result <= data_q[1];
      if (start) begin
        if (lat <= 1) result <= value;
        else begin
          data_q[lat-1]  <= value;
          valid_q[lat-1] <= 1'b1;
        end
      end
    end
  end
endmodule
