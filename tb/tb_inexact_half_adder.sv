// tb_inexact_half_adder: exhaustive check of the inexact half adder against
// its truth table (sum = a OR b, carry = a AND b).
module tb_inexact_half_adder;
  logic a, b, s, co;
  int checks = 0, failures = 0;

  inexact_half_adder dut (.a, .b, .s, .co);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Expected {co, s} for inputs 00, 01, 10, 11.
    automatic logic [1:0] exp_tt [4] = '{2'b00, 2'b01, 2'b01, 2'b11};
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({co, s} !== exp_tt[i]) begin
        failures++;
        $display("FAIL ab=%b got co,s=%b%b exp %b", {a, b}, co, s, exp_tt[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
