// tb_compressor32_d3: exhaustive check of inexact 3:2 compressor design 3
// against its 8-row truth table (sum and carry for every {a,b,ci}).
module tb_compressor32_d3;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  // Bit {a,b,ci} of each constant is the expected output.
  localparam logic [7:0] SUM_TT   = 8'b01010110;
  localparam logic [7:0] CARRY_TT = 8'b10101000;

  compressor32_d3 dut (.a, .b, .ci, .s, .co);

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
      checks += 2;
      if (s !== SUM_TT[i]) begin
        failures++;
        $display("FAIL abc=%b sum=%b exp %b", {a, b, ci}, s, SUM_TT[i]);
      end
      if (co !== CARRY_TT[i]) begin
        failures++;
        $display("FAIL abc=%b carry=%b exp %b", {a, b, ci}, co, CARRY_TT[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
