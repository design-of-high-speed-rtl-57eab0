// awm_wallace_tree: Wallace tree reduction of the compressed partial products.
//
// The ceil(N/2) rows left by AND-OR compression are reduced to two rows. Each
// stage takes the rows in groups of three; in every column of a group a
// column with three bits goes through a 3:2 compressor (row 3j -> a,
// row 3j+1 -> b, row 3j+2 -> ci), a column with two bits through a half
// adder and a single bit passes. The group leaves a sum row and a carry row
// (shifted up one weight). Rows that do not fill a group pass to the next
// stage. For N = 8 the four compressed rows need two stages: 4 -> 3 -> 2.
//
// Which columns hold how many bits is fixed by N and computed at
// elaboration time (awm_pkg::row_mask), so only cells that do real work are
// built. DESIGN selects the 3:2 compressor and HA_INEXACT the half adder,
// as for the whole multiplier. A carry out of weight 2N-1 is dropped (the
// product is 2N bits wide); with exact cells that carry is always zero.
//
// Interface: rows_in[k] is compressed row k at its weight in a 2N-bit vector.
// sum_row and carry_row are the two rows for the final adder, with
// occupancy masks row_mask(N, num_stages(N), 0) and (.., 1). Combinational.
module awm_wallace_tree
  import awm_pkg::*;
#(
  parameter int         N          = 8,
  parameter fa_design_e DESIGN     = FA_D4,
  parameter bit         HA_INEXACT = 1'b1,
  localparam int        R          = (N + 1) / 2,
  localparam int        W          = 2 * N,
  localparam int        S          = num_stages(N)
) (
  input  logic [R-1:0][W-1:0] rows_in,
  output logic [W-1:0]        sum_row,
  output logic [W-1:0]        carry_row
);

  // st[s] holds the rows entering stage s; st[S] holds the final two.
  logic [R-1:0][W-1:0] st [S+1];

  assign st[0] = rows_in;

  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int RS = stage_rows(N, s);
    localparam int G  = RS / 3;
    localparam int RN = stage_rows(N, s + 1);

    // Rows beyond those this stage produces are unused; keep them at zero.
    for (genvar k = RN; k < R; k++) begin : g_unused
      assign st[s+1][k] = '0;
    end

    for (genvar j = 0; j < G; j++) begin : g_group
      localparam mask_t MA = row_mask(N, s, 3 * j);
      localparam mask_t MB = row_mask(N, s, 3 * j + 1);
      localparam mask_t MC = row_mask(N, s, 3 * j + 2);

      logic [W-1:0] x, y, z;   // the three rows of the group
      logic [W-1:0] sum;       // sum row
      logic [W:0]   cy;        // carry row before the shift; cy[W] dropped

      assign x = st[s][3*j];
      assign y = st[s][3*j+1];
      assign z = st[s][3*j+2];

      for (genvar w = 0; w < W; w++) begin : g_col
        localparam int CNT = int'(MA[w]) + int'(MB[w]) + int'(MC[w]);
        if (CNT == 3) begin : g_fa
          compressor32 #(.DESIGN(DESIGN)) u_fa (
            .a(x[w]), .b(y[w]), .ci(z[w]), .s(sum[w]), .co(cy[w+1])
          );
        end else if (CNT == 2) begin : g_ha
          // The two occupied rows, in row order.
          logic p, q;
          assign p = MA[w] ? x[w] : y[w];
          assign q = MC[w] ? z[w] : y[w];
          half_adder_cell #(.INEXACT(HA_INEXACT)) u_ha (
            .a(p), .b(q), .s(sum[w]), .co(cy[w+1])
          );
        end else begin : g_pass
          assign sum[w]  = x[w] | y[w] | z[w];   // at most one can be set
          assign cy[w+1] = 1'b0;
        end
      end
      assign cy[0] = 1'b0;

      assign st[s+1][2*j]   = sum;
      assign st[s+1][2*j+1] = cy[W-1:0];
    end

    // Leftover rows pass straight to the next stage.
    for (genvar j = 0; j < RS % 3; j++) begin : g_pass_row
      assign st[s+1][2*G+j] = st[s][3*G+j];
    end
  end

  assign sum_row = st[S][0];
  if (stage_rows(N, S) > 1) begin : g_two_rows
    assign carry_row = st[S][1];
  end else begin : g_one_row
    assign carry_row = '0;
  end

endmodule
