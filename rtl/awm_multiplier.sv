// awm_multiplier: approximate Wallace multiplier (AWM), N x N unsigned.
//
// Three steps, all combinational:
//   1. awm_ppg builds the N x N AND partial product matrix.
//   2. awm_andor_compress ORs adjacent row pairs, halving the rows to
//      ceil(N/2) at the cost of losing the carry where both bits are 1.
//   3. awm_wallace_tree reduces those rows to two, and awm_final_adder adds
//      the two in a ripple adder. Both use inexact half adders (sum = a OR b)
//      and one of the inexact 3:2 compressors.
// DESIGN = FA_D1..FA_D4 gives AWM1..AWM4. DESIGN = FA_EXACT with
// HA_INEXACT = 0 keeps only the AND-OR compression error, which is useful
// as a reference.
//
// Interface: a, b are N-bit unsigned operands; p is the 2N-bit approximate
// product. There is no clock: p follows a and b after the gate delay.
module awm_multiplier
  import awm_pkg::*;
#(
  parameter int         N          = 8,
  parameter fa_design_e DESIGN     = FA_D4,
  parameter bit         HA_INEXACT = 1'b1,
  localparam int        R          = (N + 1) / 2,
  localparam int        W          = 2 * N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [W-1:0] p
);

  localparam int S = num_stages(N);

  logic [N-1:0][N-1:0] pp;
  logic [R-1:0][W-1:0] rows;
  logic [W-1:0]        sum_row, carry_row;

  awm_ppg #(.N(N)) u_ppg (.a, .b, .pp);

  awm_andor_compress #(.N(N)) u_compress (.pp, .rows);

  awm_wallace_tree #(
    .N(N), .DESIGN(DESIGN), .HA_INEXACT(HA_INEXACT)
  ) u_tree (
    .rows_in(rows), .sum_row, .carry_row
  );

  awm_final_adder #(
    .N(N), .DESIGN(DESIGN), .HA_INEXACT(HA_INEXACT),
    .MASK0(row_mask(N, S, 0)),
    .MASK1((stage_rows(N, S) > 1) ? row_mask(N, S, 1) : mask_t'(0))
  ) u_add (
    .x(sum_row), .y(carry_row), .p
  );

endmodule
