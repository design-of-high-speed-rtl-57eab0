// inexact_half_adder: half adder whose XOR sum gate is replaced by an OR gate.
//
// carry = a AND b (exact); sum = a OR b. The result is wrong only for
// a = b = 1, where the sum reads 1 instead of 0 (the pair reports 3 instead
// of 2). The OR gate is smaller and faster than an XOR. Combinational.
module inexact_half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);

  assign s  = a | b;
  assign co = a & b;

endmodule
