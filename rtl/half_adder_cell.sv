// half_adder_cell: two-input adder cell used by the Wallace tree and the
// final adder. With INEXACT = 1 (the approximate multipliers) it is the
// inexact half adder, whose sum is a OR b; with INEXACT = 0 it is the exact
// half adder (sum a XOR b), kept for building an exact-adder reference.
// carry = a AND b in both cases. Combinational.
module half_adder_cell #(
  parameter bit INEXACT = 1'b1
) (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);

  if (INEXACT) begin : g_inexact
    inexact_half_adder u_ha (.a, .b, .s, .co);
  end else begin : g_exact
    assign s  = a ^ b;
    assign co = a & b;
  end

endmodule
