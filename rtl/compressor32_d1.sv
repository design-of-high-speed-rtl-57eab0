// compressor32_d1: inexact 3:2 compressor (full adder), design 1.
//
// sum   = a XOR b XOR ci (exact)
// carry = (a AND b) OR ci
// The carry is wrong only for {a,b,ci} = 001, where it reads 1 instead of 0.
// Used by the AWM1 multiplier. Combinational.
module compressor32_d1 (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  assign s  = a ^ b ^ ci;
  assign co = (a & b) | ci;

endmodule
