// compressor32_d2: inexact 3:2 compressor (full adder), design 2.
//
// sum   = (a XOR b) XOR ci (exact)
// carry = (a XOR b) AND ci   (the a AND b generate term is left out)
// The carry is wrong for {a,b,ci} = 110 and 111, where it reads 0 instead of
// 1. Used by the AWM2 multiplier. Combinational.
module compressor32_d2 (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  logic p;

  assign p  = a ^ b;
  assign s  = p ^ ci;
  assign co = p & ci;

endmodule
