// tb_awm_wallace_tree: checks the Wallace reduction of compressed rows.
// Rows come from the reference AND-OR compression of random operands, or are
// random bits restricted to the occupied positions. With exact cells the two
// output rows must add up to the sum of the input rows; with each inexact
// compressor (and the inexact half adder) the two rows must match the
// bit-level reference model exactly. N = 8 (two stages) and N = 16 (four
// stages) are both exercised.
module tb_awm_wallace_tree;
  import awm_pkg::*;
  import awm_ref_pkg::*;

  localparam int N  = 8;
  localparam int NB = 16;

  logic [3:0][2*N-1:0]  rin;
  logic [4:0][2*N-1:0]  srow, crow;
  logic [7:0][2*NB-1:0] rinb;
  logic [1:0][2*NB-1:0] srowb, crowb;
  int checks = 0, failures = 0;

  awm_wallace_tree #(.N(N), .DESIGN(FA_EXACT), .HA_INEXACT(1'b0)) u0 (.rows_in(rin), .sum_row(srow[0]), .carry_row(crow[0]));
  awm_wallace_tree #(.N(N), .DESIGN(FA_D1)) u1 (.rows_in(rin), .sum_row(srow[1]), .carry_row(crow[1]));
  awm_wallace_tree #(.N(N), .DESIGN(FA_D2)) u2 (.rows_in(rin), .sum_row(srow[2]), .carry_row(crow[2]));
  awm_wallace_tree #(.N(N), .DESIGN(FA_D3)) u3 (.rows_in(rin), .sum_row(srow[3]), .carry_row(crow[3]));
  awm_wallace_tree #(.N(N), .DESIGN(FA_D4)) u4 (.rows_in(rin), .sum_row(srow[4]), .carry_row(crow[4]));
  awm_wallace_tree #(.N(NB), .DESIGN(FA_EXACT), .HA_INEXACT(1'b0)) ub0 (.rows_in(rinb), .sum_row(srowb[0]), .carry_row(crowb[0]));
  awm_wallace_tree #(.N(NB), .DESIGN(FA_D3)) ub3 (.rows_in(rinb), .sum_row(srowb[1]), .carry_row(crowb[1]));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row_q_t q, qb, o;
    longint unsigned total, got;
    for (int t = 0; t < 4000; t++) begin
      q  = compress(N, 64'($urandom), 64'($urandom));
      qb = compress(NB, 64'($urandom), 64'($urandom));
      if (t % 2 == 1) begin
        foreach (q[k])  q[k].v  = {$urandom, $urandom} & q[k].p;
        foreach (qb[k]) qb[k].v = {$urandom, $urandom} & qb[k].p;
      end
      total = 0;
      foreach (q[k]) begin
        rin[k] = q[k].v[2*N-1:0];
        total += q[k].v;
      end
      foreach (qb[k]) rinb[k] = qb[k].v[2*NB-1:0];
      #1;
      // Exact cells: the two rows carry the same total, modulo 2^(2N).
      got = longint'(srow[0]) + longint'(crow[0]);
      checks++;
      if (got[2*N-1:0] != total[2*N-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL exact N=8 rows sum %0d exp %0d", got, total);
      end
      for (int d = 1; d < 5; d++) begin
        o = wallace(N, d, 1'b1, q);
        checks++;
        if (srow[d] !== o[0].v[2*N-1:0] || crow[d] !== o[1].v[2*N-1:0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL design %0d N=8 got %h/%h exp %h/%h", d, srow[d], crow[d],
                     o[0].v[2*N-1:0], o[1].v[2*N-1:0]);
        end
      end
      o = wallace(NB, 0, 1'b0, qb);
      checks++;
      if (srowb[0] !== o[0].v[2*NB-1:0] || crowb[0] !== o[1].v[2*NB-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL exact N=16");
      end
      o = wallace(NB, 3, 1'b1, qb);
      checks++;
      if (srowb[1] !== o[0].v[2*NB-1:0] || crowb[1] !== o[1].v[2*NB-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL design 3 N=16");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
