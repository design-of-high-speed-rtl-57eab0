// compressor32: 3:2 compressor (full adder) cell with a selectable design.
//
// DESIGN picks the cell: FA_EXACT is the ordinary full adder
// (carry = ab + (a^b)ci, sum = a^b^ci); FA_D1..FA_D4 instantiate the four
// inexact designs. The multiplier uses one design throughout, which is how
// the four approximate multipliers AWM1..AWM4 differ. Combinational.
//
// Inputs are not interchangeable for the inexact designs: `a` and `b` are
// the two addends and `ci` the third input (the carry-in in a ripple adder,
// the third row in a Wallace group).
module compressor32
  import awm_pkg::*;
#(
  parameter fa_design_e DESIGN = FA_D4
) (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  case (DESIGN)
    FA_D1: begin : g_d1
      compressor32_d1 u_cell (.a, .b, .ci, .s, .co);
    end
    FA_D2: begin : g_d2
      compressor32_d2 u_cell (.a, .b, .ci, .s, .co);
    end
    FA_D3: begin : g_d3
      compressor32_d3 u_cell (.a, .b, .ci, .s, .co);
    end
    FA_D4: begin : g_d4
      compressor32_d4 u_cell (.a, .b, .ci, .s, .co);
    end
    default: begin : g_exact
      assign s  = a ^ b ^ ci;
      assign co = (a & b) | ((a ^ b) & ci);
    end
  endcase

endmodule
