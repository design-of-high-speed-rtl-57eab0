// tb_awm_ppg: exhaustive check of the 8x8 partial product generator: every
// bit pp[i][j] must equal a[j] AND b[i], and the rows, shifted to their
// weights and added, must give the exact product a*b.
module tb_awm_ppg;
  localparam int N = 8;
  logic [N-1:0] a, b;
  logic [N-1:0][N-1:0] pp;
  int checks = 0, failures = 0;

  awm_ppg #(.N(N)) dut (.a, .b, .pp);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned acc;
    bit bad;
    for (int i = 0; i < (1 << (2 * N)); i++) begin
      {a, b} = (2*N)'(i);
      #1;
      acc = 0;
      bad = 0;
      for (int r = 0; r < N; r++) begin
        acc += int'(pp[r]) << r;
        for (int c = 0; c < N; c++)
          if (pp[r][c] !== (a[c] & b[r])) bad = 1;
      end
      checks++;
      if (bad || acc != int'(a) * int'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d sum of rows=%0d", a, b, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
