// awm_andor_compress: AND-OR logic compression of the partial product matrix.
//
// Adjacent partial product rows are taken in pairs (rows 2k and 2k+1). Row
// 2k+1 sits one weight above row 2k, so the two rows overlap in N-1 columns.
// In each overlapping column the two bits are combined by an OR gate instead
// of being added: 1+1 gives 1 instead of binary 10, so the carry is lost
// (the only error case, see the AND-OR truth table). The non-overlapping end
// bits pass unchanged. The N rows thus become ceil(N/2) rows of N+1 bits,
// which halves the work left for the Wallace tree.
//
// Interface: pp[i] is partial product row i (unshifted, from awm_ppg).
// rows[k] is compressed row k, already shifted to its weight 2k inside a
// 2N-bit vector; bits outside 2k .. 2k+N are zero. With an odd N the last
// row has no partner and passes through. Combinational.
//
// Pairing adjacent rows is this implementation's reading of "approximated by
// half using an array of OR gates"; it reproduces the example products the
// source design reports for its compressed multiplier.
module awm_andor_compress #(
  parameter int N = 8,
  localparam int R = (N + 1) / 2
) (
  input  logic [N-1:0][N-1:0]  pp,
  output logic [R-1:0][2*N-1:0] rows
);

  for (genvar k = 0; k < R; k++) begin : g_pair
    logic [2*N-1:0] lo, hi;
    assign lo = {{N{1'b0}}, pp[2*k]} << (2 * k);
    if (2 * k + 1 < N) begin : g_two
      assign hi = {{N{1'b0}}, pp[2*k+1]} << (2 * k + 1);
    end else begin : g_one
      assign hi = '0;
    end
    // One OR gate per overlapping column; elsewhere one operand is zero.
    assign rows[k] = lo | hi;
  end

endmodule
