// tb_compressor32: checks that each DESIGN setting of the selectable 3:2
// compressor behaves as the corresponding truth table (exact, designs 1-4),
// over all eight input combinations.
module tb_compressor32;
  import awm_pkg::*;
  import awm_ref_pkg::*;

  logic a, b, ci;
  logic [4:0] s, co;
  int checks = 0, failures = 0;

  compressor32 #(.DESIGN(FA_EXACT)) u0 (.a, .b, .ci, .s(s[0]), .co(co[0]));
  compressor32 #(.DESIGN(FA_D1))    u1 (.a, .b, .ci, .s(s[1]), .co(co[1]));
  compressor32 #(.DESIGN(FA_D2))    u2 (.a, .b, .ci, .s(s[2]), .co(co[2]));
  compressor32 #(.DESIGN(FA_D3))    u3 (.a, .b, .ci, .s(s[3]), .co(co[3]));
  compressor32 #(.DESIGN(FA_D4))    u4 (.a, .b, .ci, .s(s[4]), .co(co[4]));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, ci} = 3'(i);
      #1;
      for (int d = 0; d < 5; d++) begin
        checks++;
        if (s[d] !== SUM_TT[d][i] || co[d] !== CARRY_TT[d][i]) begin
          failures++;
          $display("FAIL design %0d abc=%b got co,s=%b%b exp %b%b", d, {a, b, ci},
                   co[d], s[d], CARRY_TT[d][i], SUM_TT[d][i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
