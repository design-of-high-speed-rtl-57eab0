// awm_ppg: partial product generation for an N x N unsigned multiplier.
//
// Row i of the partial product matrix is the multiplicand `a` ANDed with bit
// i of the multiplier `b`; bit j of that row has weight i+j. The block is the
// usual array of N*N two-input AND gates and is purely combinational.
//
// Interface: a, b are N-bit unsigned operands; pp[i][j] = a[j] & b[i]. Rows
// are left unshifted; the next stage places row i at weight i.
module awm_ppg #(
  parameter int N = 8
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp
);

  for (genvar i = 0; i < N; i++) begin : g_row
    assign pp[i] = a & {N{b[i]}};
  end

endmodule
