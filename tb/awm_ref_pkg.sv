// awm_ref_pkg: bit-level reference model of the approximate Wallace
// multipliers, for the testbenches only.
//
// The cells are described by their truth tables (an 8-entry sum table and an
// 8-entry carry table per design, indexed by {a,b,ci}) rather than by their
// equations, so a slip in an RTL equation shows up as a mismatch. The
// multiplier model builds the AND-OR compressed rows, runs the row-grouped
// Wallace reduction and the ripple final adder, tracking which bit positions
// are occupied as it goes (the RTL computes the same occupancy in advance).
// The model also counts how often each cell meets an input on which it
// differs from the exact cell, so a testbench can show those cases occur.
package awm_ref_pkg;

  // Sum and carry truth tables, bit {a,b,ci} of the constant is the output.
  // Index 0 = exact full adder, 1..4 = inexact compressor designs 1..4.
  localparam logic [7:0] SUM_TT   [5] = '{8'h96, 8'h96, 8'h96, 8'h56, 8'h96};
  localparam logic [7:0] CARRY_TT [5] = '{8'hE8, 8'hEA, 8'h28, 8'hA8, 8'hF0};

  // Fault counters: cell evaluations whose output differs from exact.
  longint unsigned fa_faults [5];
  longint unsigned ha_faults;
  longint unsigned or_losses;    // AND-OR columns where both bits were 1

  function automatic void clear_counts();
    for (int i = 0; i < 5; i++) fa_faults[i] = 0;
    ha_faults = 0;
    or_losses = 0;
  endfunction

  function automatic void fa(input int d, input bit a, input bit b, input bit c,
                             output bit s, output bit co);
    int idx;
    idx = {29'd0, a, b, c};
    s  = SUM_TT[d][idx];
    co = CARRY_TT[d][idx];
    if (s != SUM_TT[0][idx] || co != CARRY_TT[0][idx]) fa_faults[d]++;
  endfunction

  function automatic void ha(input bit inexact, input bit a, input bit b,
                             output bit s, output bit co);
    co = a & b;
    s  = inexact ? (a | b) : (a ^ b);
    if (inexact && a && b) ha_faults++;
  endfunction

  // One row: value bits and the positions that are occupied.
  typedef struct packed {
    logic [63:0] v;
    logic [63:0] p;
  } row_t;

  typedef row_t row_q_t[$];

  // AND-OR compression of a*b into ceil(n/2) rows.
  function automatic row_q_t compress(input int n, input longint unsigned a,
                                      input longint unsigned b);
    row_q_t rows;
    row_t r;
    bit in0, in1, b0, b1;
    for (int k = 0; 2 * k < n; k++) begin
      r = '0;
      for (int w = 0; w < 2 * n; w++) begin
        in0 = (w >= 2 * k) && (w < 2 * k + n);
        in1 = (2 * k + 1 < n) && (w >= 2 * k + 1) && (w < 2 * k + 1 + n);
        b0 = in0 && a[w-2*k] && b[2*k];
        b1 = in1 && a[w-2*k-1] && b[2*k+1];
        r.p[w] = in0 | in1;
        r.v[w] = b0 | b1;
        if (b0 && b1) or_losses++;
      end
      rows.push_back(r);
    end
    return rows;
  endfunction

  // Row-grouped Wallace reduction to (at most) two rows.
  function automatic row_q_t wallace(input int n, input int d, input bit hinx,
                                     input row_q_t rows_in);
    row_q_t rows, nxt;
    row_t s, c;
    bit bits[3];
    int cnt, g;
    bit so, co;
    rows = rows_in;
    while (rows.size() > 2) begin
      nxt.delete();
      g = rows.size() / 3;
      for (int j = 0; j < g; j++) begin
        s = '0;
        c = '0;
        for (int w = 0; w < 2 * n; w++) begin
          cnt = 0;
          for (int k = 0; k < 3; k++)
            if (rows[3*j+k].p[w]) begin
              bits[cnt] = rows[3*j+k].v[w];
              cnt++;
            end
          so = 0;
          co = 0;
          if (cnt == 3) fa(d, bits[0], bits[1], bits[2], so, co);
          else if (cnt == 2) ha(hinx, bits[0], bits[1], so, co);
          else if (cnt == 1) so = bits[0];
          s.v[w] = so;
          s.p[w] = (cnt > 0);
          if (w + 1 < 2 * n) begin
            c.v[w+1] = co;
            c.p[w+1] = (cnt >= 2);
          end
        end
        nxt.push_back(s);
        nxt.push_back(c);
      end
      for (int j = 3 * g; j < rows.size(); j++) nxt.push_back(rows[j]);
      rows = nxt;
    end
    return rows;
  endfunction

  // Ripple final adder over two rows (or one).
  function automatic longint unsigned ripple(input int n, input int d, input bit hinx,
                                             input row_t x, input row_t y);
    longint unsigned out;
    bit bits[3];
    int cnt;
    bit cv, cp, so, co;
    out = 0;
    cv = 0;
    cp = 0;
    for (int w = 0; w < 2 * n; w++) begin
      cnt = 0;
      if (x.p[w]) begin bits[cnt] = x.v[w]; cnt++; end
      if (y.p[w]) begin bits[cnt] = y.v[w]; cnt++; end
      if (cp)     begin bits[cnt] = cv;     cnt++; end
      so = 0;
      co = 0;
      if (cnt == 3) fa(d, bits[0], bits[1], bits[2], so, co);
      else if (cnt == 2) ha(hinx, bits[0], bits[1], so, co);
      else if (cnt == 1) so = bits[0];
      out[w] = so;
      cv = co;
      cp = (cnt >= 2);
    end
    return out;
  endfunction

  // Whole approximate multiplier.
  function automatic longint unsigned mult(input int n, input int d, input bit hinx,
                                           input longint unsigned a,
                                           input longint unsigned b);
    row_q_t rows;
    row_t zero;
    zero = '0;
    rows = wallace(n, d, hinx, compress(n, a, b));
    if (rows.size() == 1) return ripple(n, d, hinx, rows[0], zero);
    return ripple(n, d, hinx, rows[0], rows[1]);
  endfunction

  // Sum of the compressed rows, computed arithmetically (no adder cells).
  function automatic longint unsigned compressed_value(input int n,
                                                       input longint unsigned a,
                                                       input longint unsigned b);
    longint unsigned acc, r0, r1;
    acc = 0;
    for (int k = 0; 2 * k < n; k++) begin
      r0 = b[2*k] ? (a << (2 * k)) : 0;
      r1 = (2 * k + 1 < n && b[2*k+1]) ? (a << (2 * k + 1)) : 0;
      acc += r0 | r1;
    end
    return acc;
  endfunction

endpackage
