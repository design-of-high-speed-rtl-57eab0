// tb_awm_andor_compress: checks the AND-OR row-pair compression.
// Random partial product matrices (N = 8, and N = 7 for an unpaired last row)
// are compressed and each output row is compared with (row 2k << 2k) OR
// (row 2k+1 << 2k+1) worked out here. Real operand pairs are also fed through
// the partial product generator and the sum of the compressed rows is
// compared with the values the design reports for its compressed multiplier
// with exact adders: 4*4 = 16, 50*50 = 1988, 140*140 = 19568.
module tb_awm_andor_compress;
  localparam int N  = 8;
  localparam int N7 = 7;

  logic [N-1:0][N-1:0]    pp;
  logic [3:0][2*N-1:0]    rows;
  logic [N7-1:0][N7-1:0]  pp7;
  logic [3:0][2*N7-1:0]   rows7;
  logic [N-1:0]           a, b;
  logic [N-1:0][N-1:0]    ppab;
  logic [3:0][2*N-1:0]    rowsab;
  int checks = 0, failures = 0;

  awm_andor_compress #(.N(N))  dut  (.pp(pp),   .rows(rows));
  awm_andor_compress #(.N(N7)) dut7 (.pp(pp7),  .rows(rows7));
  awm_ppg            #(.N(N))  u_pg (.a, .b, .pp(ppab));
  awm_andor_compress #(.N(N))  dutab(.pp(ppab), .rows(rowsab));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned row_sum(input logic [3:0][2*N-1:0] r);
    return int'(r[0]) + int'(r[1]) + int'(r[2]) + int'(r[3]);
  endfunction

  initial begin
    logic [2*N-1:0]  e;
    logic [2*N7-1:0] e7;
    automatic int unsigned ops [4] = '{4, 50, 140, 255};
    automatic int unsigned expv[3] = '{16, 1988, 19568};
    for (int t = 0; t < 2000; t++) begin
      for (int r = 0; r < N; r++) pp[r] = N'($urandom);
      for (int r = 0; r < N7; r++) pp7[r] = N7'($urandom);
      #1;
      for (int k = 0; k < 4; k++) begin
        e = ((2*N)'(pp[2*k]) << (2 * k)) | ((2*N)'(pp[2*k+1]) << (2 * k + 1));
        checks++;
        if (rows[k] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL N=8 row %0d got %h exp %h", k, rows[k], e);
        end
        e7 = (2*N7)'(pp7[2*k]) << (2 * k);
        if (2 * k + 1 < N7) e7 |= (2*N7)'(pp7[2*k+1]) << (2 * k + 1);
        checks++;
        if (rows7[k] !== e7) begin
          failures++;
          if (failures < 10) $display("FAIL N=7 row %0d got %h exp %h", k, rows7[k], e7);
        end
      end
    end
    for (int i = 0; i < 3; i++) begin
      a = N'(ops[i]);
      b = N'(ops[i]);
      #1;
      checks++;
      if (row_sum(rowsab) != expv[i]) begin
        failures++;
        $display("FAIL %0d*%0d compressed sum %0d exp %0d", a, b, row_sum(rowsab), expv[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
