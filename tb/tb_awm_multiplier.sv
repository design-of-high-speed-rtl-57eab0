// tb_awm_multiplier: end-to-end check of the approximate Wallace multiplier.
//  * N = 8, all 65536 operand pairs, for AWM1..AWM4 and for the exact-cell
//    reference configuration, against the bit-level reference model.
//  * The exact-cell configuration must equal the arithmetic sum of the
//    AND-OR compressed rows (only the compression error remains), and must
//    give the design's reported example products 16, 1988 and 19568 for
//    4*4, 50*50 and 140*140. AWM2 must give 1988 and 19568 for 50*50 and
//    140*140, and AWM1 and AWM4 must give 65535 for 255*255, as reported.
//  * N = 7 (odd) and N = 16 are checked on random operands.
module tb_awm_multiplier;
  import awm_pkg::*;
  import awm_ref_pkg::*;

  localparam int N = 8;
  localparam int W = 2 * N;

  logic [N-1:0] a, b;
  logic [4:0][W-1:0] p;
  logic [6:0]  a7, b7;
  logic [13:0] p7;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  int checks = 0, failures = 0;

  awm_multiplier #(.N(N), .DESIGN(FA_EXACT), .HA_INEXACT(1'b0)) u0 (.a, .b, .p(p[0]));
  awm_multiplier #(.N(N), .DESIGN(FA_D1)) u1 (.a, .b, .p(p[1]));
  awm_multiplier #(.N(N), .DESIGN(FA_D2)) u2 (.a, .b, .p(p[2]));
  awm_multiplier #(.N(N), .DESIGN(FA_D3)) u3 (.a, .b, .p(p[3]));
  awm_multiplier #(.N(N), .DESIGN(FA_D4)) u4 (.a, .b, .p(p[4]));
  awm_multiplier #(.N(7),  .DESIGN(FA_D2)) u7  (.a(a7),  .b(b7),  .p(p7));
  awm_multiplier #(.N(16), .DESIGN(FA_D4)) u16 (.a(a16), .b(b16), .p(p16));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint unsigned got,
                           input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    longint unsigned e;
    // Exhaustive N = 8.
    for (int i = 0; i < (1 << (2 * N)); i++) begin
      {a, b} = (2*N)'(i);
      #1;
      e = compressed_value(N, 64'(a), 64'(b));
      expect_eq($sformatf("exact cells %0d*%0d", a, b), 64'(p[0]), 64'(e[W-1:0]));
      for (int d = 1; d < 5; d++) begin
        e = mult(N, d, 1'b1, 64'(a), 64'(b));
        expect_eq($sformatf("AWM%0d %0d*%0d", d, a, b), 64'(p[d]), e);
      end
    end
    // Example products reported for the design.
    a = 4;   b = 4;   #1; expect_eq("exact cells 4*4", 64'(p[0]), 16);
    a = 50;  b = 50;  #1; expect_eq("exact cells 50*50", 64'(p[0]), 1988);
                          expect_eq("AWM2 50*50", 64'(p[2]), 1988);
    a = 140; b = 140; #1; expect_eq("exact cells 140*140", 64'(p[0]), 19568);
                          expect_eq("AWM2 140*140", 64'(p[2]), 19568);
    a = 255; b = 255; #1; expect_eq("AWM1 255*255", 64'(p[1]), 65535);
                          expect_eq("AWM4 255*255", 64'(p[4]), 65535);
    // Other widths.
    for (int t = 0; t < 3000; t++) begin
      a7 = 7'($urandom);   b7 = 7'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom);
      #1;
      expect_eq($sformatf("N=7 AWM2 %0d*%0d", a7, b7), 64'(p7), mult(7, 2, 1'b1, 64'(a7), 64'(b7)));
      expect_eq($sformatf("N=16 AWM4 %0d*%0d", a16, b16), 64'(p16), mult(16, 4, 1'b1, 64'(a16), 64'(b16)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
