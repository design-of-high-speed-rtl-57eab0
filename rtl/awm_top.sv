// awm_top: the four approximate Wallace multipliers AWM1..AWM4 side by side.
//
// All four share the operands a and b and differ only in the inexact 3:2
// compressor used in their Wallace tree and final adder (designs 1..4); all
// use AND-OR compression and the inexact half adder. Each product has its
// own output so the variants can be compared on the same inputs. Purely
// combinational: the products follow the operands with no clock or latency.
//
// Interface: a, b N-bit unsigned; p_awm1..p_awm4 2N-bit approximate products.
module awm_top
  import awm_pkg::*;
#(
  parameter int  N = 8,
  localparam int W = 2 * N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [W-1:0] p_awm1,
  output logic [W-1:0] p_awm2,
  output logic [W-1:0] p_awm3,
  output logic [W-1:0] p_awm4
);

  awm_multiplier #(.N(N), .DESIGN(FA_D1)) u_awm1 (.a, .b, .p(p_awm1));
  awm_multiplier #(.N(N), .DESIGN(FA_D2)) u_awm2 (.a, .b, .p(p_awm2));
  awm_multiplier #(.N(N), .DESIGN(FA_D3)) u_awm3 (.a, .b, .p(p_awm3));
  awm_multiplier #(.N(N), .DESIGN(FA_D4)) u_awm4 (.a, .b, .p(p_awm4));

endmodule
