// compressor32_d4: inexact 3:2 compressor (full adder), design 4.
//
// sum   = (a XOR b) XOR ci (exact)
// carry = a                 (no carry logic at all)
// The carry is wrong for {a,b,ci} = 011 (0 instead of 1) and 100 (1 instead
// of 0). Because the carry does not depend on ci, a chain of these cells has
// no carry ripple. Used by the AWM4 multiplier. Combinational.
module compressor32_d4 (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  assign s  = a ^ b ^ ci;
  assign co = a;

endmodule
