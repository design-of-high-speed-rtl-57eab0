// awm_pkg: types and elaboration-time helpers shared by the approximate
// Wallace multiplier (AWM) modules.
//
// The multiplier reduces its partial products through a tree whose shape is
// fixed by the operand width N. Every row travelling through the tree is kept
// as a 2N-bit vector, together with a constant "mask" that says which of its
// bit positions can ever be non-zero. The functions below compute those masks
// at elaboration time, so each module can place a 3:2 compressor where a
// column holds three bits, a half adder where it holds two and a plain wire
// where it holds one. Nothing here is clocked; the helpers produce constants
// only.
//
// The set of 3:2 compressor designs (exact plus the four inexact ones) and the
// inexact half adder follow the source design; the mask bookkeeping is this
// implementation's way of writing the tree for any N.
package awm_pkg;

  // Which 3:2 compressor (full adder) cell the tree and the final adder use.
  // FA_EXACT is the ordinary full adder; FA_D1..FA_D4 are the four inexact
  // designs, which give the multipliers AWM1..AWM4.
  typedef enum logic [2:0] {
    FA_EXACT = 3'd0,
    FA_D1    = 3'd1,
    FA_D2    = 3'd2,
    FA_D3    = 3'd3,
    FA_D4    = 3'd4
  } fa_design_e;

  // Widest product the masks can describe (so N <= 32).
  localparam int MAX_W = 64;
  // Most rows the helpers track (so N <= 64 rows before compression / 2).
  localparam int MAX_ROWS = 32;

  typedef logic [MAX_W-1:0] mask_t;

  // Mask with the low `w` bits set.
  function automatic mask_t low_mask(input int w);
    mask_t m;
    m = '0;
    for (int i = 0; i < MAX_W; i++)
      if (i < w) m[i] = 1'b1;
    return m;
  endfunction

  // Number of rows left after AND-OR compression of an N x N matrix.
  function automatic int compressed_rows(input int n);
    return (n + 1) / 2;
  endfunction

  // Rows present before Wallace stage `s` (stage 0 = compressed rows).
  // Each stage turns every complete group of three rows into two and passes
  // the one or two leftover rows through.
  function automatic int stage_rows(input int n, input int s);
    int r;
    r = compressed_rows(n);
    for (int k = 0; k < s; k++)
      r = 2 * (r / 3) + (r % 3);
    return r;
  endfunction

  // Number of Wallace stages needed to reach two rows.
  function automatic int num_stages(input int n);
    int r, s;
    r = compressed_rows(n);
    s = 0;
    while (r > 2) begin
      r = 2 * (r / 3) + (r % 3);
      s++;
    end
    return s;
  endfunction

  // Occupancy mask of row `r` before Wallace stage `s`.
  // Compressed row k covers bit weights 2k .. 2k+N (N+1 bits); a last,
  // unpaired row (odd N) covers 2k .. 2k+N-1. After a stage, the sum row of a
  // group occupies every column any of its three rows occupied, and the carry
  // row occupies column w+1 for each column w that held two or more bits.
  // Bits at weight 2N and above are dropped (the product is 2N bits wide).
  function automatic mask_t row_mask(input int n, input int s, input int r);
    mask_t cur [MAX_ROWS];
    mask_t nxt [MAX_ROWS];
    mask_t wm, a, b, c;
    int rows, g;
    wm = low_mask(2 * n);
    rows = compressed_rows(n);
    for (int k = 0; k < MAX_ROWS; k++) begin
      cur[k] = '0;
      nxt[k] = '0;
    end
    for (int k = 0; k < rows; k++)
      cur[k] = (low_mask((2 * k + 1 < n) ? n + 1 : n) << (2 * k)) & wm;
    for (int st = 0; st < s; st++) begin
      g = rows / 3;
      for (int k = 0; k < MAX_ROWS; k++) nxt[k] = '0;
      for (int j = 0; j < g; j++) begin
        a = cur[3*j];
        b = cur[3*j+1];
        c = cur[3*j+2];
        nxt[2*j]   = a | b | c;
        nxt[2*j+1] = (((a & b) | (a & c) | (b & c)) << 1) & wm;
      end
      for (int j = 0; j < rows % 3; j++)
        nxt[2*g+j] = cur[3*g+j];
      for (int k = 0; k < MAX_ROWS; k++) cur[k] = nxt[k];
      rows = 2 * g + (rows % 3);
    end
    return cur[r];
  endfunction

  // Columns of a ripple adder over rows with masks m0, m1 that receive a
  // carry from the column below (a column with two or more inputs makes one).
  function automatic mask_t carry_mask(input mask_t m0, input mask_t m1, input int w);
    mask_t c;
    int cnt;
    c = '0;
    for (int i = 0; i + 1 < w; i++) begin
      cnt = int'(m0[i]) + int'(m1[i]) + int'(c[i]);
      if (cnt >= 2) c[i+1] = 1'b1;
    end
    return c;
  endfunction

endpackage
