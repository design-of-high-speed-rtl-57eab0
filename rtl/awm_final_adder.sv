// awm_final_adder: final carry-propagate addition of the two Wallace rows.
//
// A ripple-carry adder built from the same cells as the tree: a column with
// both row bits and an incoming carry uses the selected 3:2 compressor
// (a = x bit, b = y bit, ci = carry from the column below), a column with
// two inputs a half adder, a column with one input a wire. MASK0 and MASK1
// say which bits of x and y can be non-zero, so the adder is built only for
// the occupied columns; with the default all-ones masks it is a plain 2N-bit
// adder. The carry out of the top column is dropped.
//
// With inexact cells the carry chain is cut short: design 4 takes its carry
// from `a` alone, so no carry ripples at all; that is where most of its
// speed comes from.
//
// Interface: x, y are the addends; p = x + y (exact cells) or the
// approximate sum, 2N bits. Combinational.
module awm_final_adder
  import awm_pkg::*;
#(
  parameter int         N          = 8,
  parameter fa_design_e DESIGN     = FA_D4,
  parameter bit         HA_INEXACT = 1'b1,
  parameter mask_t      MASK0      = low_mask(2 * N),
  parameter mask_t      MASK1      = low_mask(2 * N),
  localparam int        W          = 2 * N
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] p
);

  localparam mask_t MC = carry_mask(MASK0, MASK1, W);

  logic [W:0] c;   // c[w] is the carry into column w; c[W] is dropped

  assign c[0] = 1'b0;

  for (genvar w = 0; w < W; w++) begin : g_col
    localparam int CNT = int'(MASK0[w]) + int'(MASK1[w]) + int'(MC[w]);
    if (CNT == 3) begin : g_fa
      compressor32 #(.DESIGN(DESIGN)) u_fa (
        .a(x[w]), .b(y[w]), .ci(c[w]), .s(p[w]), .co(c[w+1])
      );
    end else if (CNT == 2) begin : g_ha
      logic u, v;
      assign u = MASK0[w] ? x[w] : y[w];
      assign v = MC[w] ? c[w] : y[w];
      half_adder_cell #(.INEXACT(HA_INEXACT)) u_ha (
        .a(u), .b(v), .s(p[w]), .co(c[w+1])
      );
    end else if (CNT == 1) begin : g_pass
      assign p[w]   = MASK0[w] ? x[w] : (MASK1[w] ? y[w] : c[w]);
      assign c[w+1] = 1'b0;
    end else begin : g_empty
      assign p[w]   = 1'b0;
      assign c[w+1] = 1'b0;
    end
  end

endmodule
