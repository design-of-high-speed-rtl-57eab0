// compressor32_d3: inexact 3:2 compressor (full adder), design 3.
//
// The a XOR b gate of the exact cell is replaced by a OR b:
// sum   = (a OR b) XOR ci
// carry = (a OR b) AND ci
// Wrong for {a,b,ci} = 110 (sum 1, carry 0 instead of sum 0, carry 1) and
// 111 (sum 0 instead of 1). Used by the AWM3 multiplier. Combinational.
module compressor32_d3 (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  logic p;

  assign p  = a | b;
  assign s  = p ^ ci;
  assign co = p & ci;

endmodule
