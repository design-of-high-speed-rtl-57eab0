// tb_awm_top: end-to-end test of the four approximate multipliers at their
// default size (8 x 8 bits), over all 65536 operand pairs.
//
// Every product is compared with the bit-level reference model. The test also
// counts how often each approximation mechanism actually fires (an AND-OR
// compression column with both bits set, an inexact half adder seeing 1+1,
// each inexact compressor seeing an input on which it differs from the exact
// full adder) and fails if any never does. Finally it reports, per
// multiplier, the error rate, the mean error distance and the largest error
// against the exact product, and the products for the example operands
// 4, 50, 140 and 255 (each squared). The multipliers are combinational, so
// each product is sampled one time step after the operands change.
module tb_awm_top;
  import awm_ref_pkg::*;

  localparam int N = 8;
  localparam int W = 2 * N;

  logic [N-1:0] a, b;
  logic [W-1:0] p_awm1, p_awm2, p_awm3, p_awm4;
  int checks = 0, failures = 0;

  awm_top dut (.a, .b, .p_awm1, .p_awm2, .p_awm3, .p_awm4);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] product(input int d);
    case (d)
      1: return p_awm1;
      2: return p_awm2;
      3: return p_awm3;
      default: return p_awm4;
    endcase
  endfunction

  initial begin
    longint unsigned e, exact_p, err, got;
    longint unsigned n_err [5], sum_err [5], max_err [5];
    automatic int ops [4] = '{4, 50, 140, 255};
    clear_counts();
    for (int d = 1; d < 5; d++) begin
      n_err[d] = 0; sum_err[d] = 0; max_err[d] = 0;
    end
    for (int i = 0; i < (1 << (2 * N)); i++) begin
      {a, b} = (2*N)'(i);
      #1;
      exact_p = longint'(a) * longint'(b);
      for (int d = 1; d < 5; d++) begin
        e = mult(N, d, 1'b1, 64'(a), 64'(b));
        checks++;
        if (product(d) != e[W-1:0]) begin
          failures++;
          if (failures < 20) $display("FAIL AWM%0d %0d*%0d got %0d exp %0d", d, a, b, product(d), e);
        end
        got = 64'(product(d));
        err = (got > exact_p) ? got - exact_p : exact_p - got;
        if (err != 0) n_err[d]++;
        sum_err[d] += err;
        if (err > max_err[d]) max_err[d] = err;
      end
    end
    // Every approximation mechanism must have fired at least once.
    $display("AND-OR compression losses: %0d", or_losses);
    $display("inexact half adder 1+1 cases: %0d", ha_faults);
    checks++;
    if (or_losses == 0) begin failures++; $display("FAIL AND-OR loss never seen"); end
    checks++;
    if (ha_faults == 0) begin failures++; $display("FAIL half adder error never seen"); end
    for (int d = 1; d < 5; d++) begin
      $display("compressor design %0d inexact cases: %0d", d, fa_faults[d]);
      checks++;
      if (fa_faults[d] == 0) begin
        failures++;
        $display("FAIL compressor design %0d never met an inexact case", d);
      end
      $display("AWM%0d: error rate %0.2f%%  mean error distance %0.1f  max error %0d",
               d, 100.0 * real'(n_err[d]) / 65536.0, real'(sum_err[d]) / 65536.0, max_err[d]);
    end
    for (int k = 0; k < 4; k++) begin
      a = N'(ops[k]);
      b = N'(ops[k]);
      #1;
      $display("%0d*%0d: exact %0d  AWM1 %0d  AWM2 %0d  AWM3 %0d  AWM4 %0d",
               a, b, int'(a) * int'(b), p_awm1, p_awm2, p_awm3, p_awm4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
