// tb_logic_fu: every LOGIC operation (and, ior, xor) with random operands against a reference
// computed in the testbench, result checked one cycle after the trigger.
// Also checks that an operand written with the trigger is used, that a held
// operand is reused, and that the lock (en low) keeps the result.
module tb_logic_fu;
  import tta_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en, opnd_we, trigger;
  logic [31:0] opnd_in, trig_in, result;
  logic_op_e op;
  int checks = 0, failures = 0;

  logic_fu #(.W(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [31:0] ref_logic(logic_op_e o, logic [31:0] a, logic [31:0] b);
    case (o)
      LOG_AND: return a & b;
      LOG_IOR: return a | b;
      LOG_XOR: return a ^ b;
      default: return 0;
    endcase
  endfunction

  initial begin
    logic [31:0] a, exp;
    en = 1; opnd_we = 0; trigger = 0; opnd_in = 0; trig_in = 0; op = LOG_AND;
    repeat (2) @(posedge clk);
    rst_n = 1;
    a = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      opnd_we = ($urandom % 3 != 0);
      opnd_in = ($urandom % 4 == 0) ? 32'(int'($urandom % 7) - 3) : $urandom;
      trig_in = ($urandom % 4 == 0) ? opnd_in : $urandom;
      if ($urandom % 4 == 0) trig_in = trig_in % 40;
      op = logic_op_e'(1 + $urandom % 3);
      trigger = 1;
      if (opnd_we) a = opnd_in;
      exp = ref_logic(op, a, trig_in);
      @(negedge clk);
      check(result == exp, $sformatf("op %s", op.name()));
      // locked trigger: result must stay
      trigger = 1; en = 0; opnd_we = 1; opnd_in = ~a; trig_in = $urandom;
      @(negedge clk);
      check(result == exp, "lock holds result");
      en = 1; opnd_we = 0; trigger = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
