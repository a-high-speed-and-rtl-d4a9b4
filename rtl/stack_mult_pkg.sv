// stack_mult_pkg: shared types and elaboration-time helpers for the
// counter-based multiplier.
//
// counter_kind_e selects which 6:3 counter circuit the reduction tree uses.
// The stacking counter is the main one; the propagate/generate counter and
// the full-adder counter are the two other 6:3 counter circuits described
// alongside it and are kept selectable for comparison.
//
// The functions below describe the shape of the column-compression tree.
// They are evaluated only while the design is elaborated (constant functions)
// and produce no hardware. A column of height h is reduced in one stage by
// h/6 counters on full groups of six bits, plus one more counter on the
// remaining bits when at least three remain (its unused inputs tied to 0);
// one or two leftover bits pass straight to the next stage. Columns of height
// three or less are not touched. Each counter leaves its sum in the same
// column, C1 in the next column and C2 two columns up. Stages are added until
// no column is taller than three. This stage rule is this design's choice.
package stack_mult_pkg;

  typedef enum logic [1:0] {
    CNT_STACK = 2'd0,  // bit-stacking counter (main design)
    CNT_PG    = 2'd1,  // propagate/generate counter
    CNT_FA    = 2'd2   // three full adders and a half adder
  } counter_kind_e;

  localparam int unsigned MAX_COLS = 512;

  // Number of 6:3 counters placed on a column of height h.
  function automatic int unsigned counters_for(input int unsigned h);
    if (h <= 3) return 0;
    return h / 6 + (((h % 6) >= 3) ? 1 : 0);
  endfunction

  // Bits of a column of height h that bypass the counters.
  function automatic int unsigned pass_for(input int unsigned h);
    int unsigned used;
    used = 6 * counters_for(h);
    if (used > h) used = h;
    return h - used;
  endfunction

  // Height of column c of the N x N partial-product matrix (2N columns).
  function automatic int unsigned pp_height(input int unsigned n, input int unsigned c);
    if (c > 2 * n - 2) return 0;
    return ((c < 2 * n - 2 - c) ? c : 2 * n - 2 - c) + 1;
  endfunction

  // Height of column c after stage s (s = 0 is the partial-product matrix).
  function automatic int unsigned col_height(input int unsigned n, input int unsigned s,
                                             input int unsigned c);
    int unsigned h   [MAX_COLS];
    int unsigned nh  [MAX_COLS];
    int unsigned k, k1, k2;
    for (int unsigned i = 0; i < 2 * n; i++) h[i] = pp_height(n, i);
    for (int unsigned st = 0; st < s; st++) begin
      for (int unsigned i = 0; i < 2 * n; i++) begin
        k  = counters_for(h[i]);
        k1 = (i >= 1) ? counters_for(h[i-1]) : 0;
        k2 = (i >= 2) ? counters_for(h[i-2]) : 0;
        nh[i] = pass_for(h[i]) + k + k1 + k2;
      end
      for (int unsigned i = 0; i < 2 * n; i++) h[i] = nh[i];
    end
    return h[c];
  endfunction

  // Tallest column after stage s.
  function automatic int unsigned max_height(input int unsigned n, input int unsigned s);
    int unsigned m;
    m = 0;
    for (int unsigned i = 0; i < 2 * n; i++)
      if (col_height(n, s, i) > m) m = col_height(n, s, i);
    return m;
  endfunction

  // Number of counter stages needed until every column holds at most three bits.
  function automatic int unsigned num_stages(input int unsigned n);
    int unsigned s;
    s = 0;
    while (max_height(n, s) > 3 && s < 64) s++;
    return s;
  endfunction

  // Tallest column over all stages; sizes the tree's bit array.
  function automatic int unsigned tree_height(input int unsigned n);
    int unsigned m;
    m = 1;
    for (int unsigned s = 0; s <= num_stages(n); s++)
      if (max_height(n, s) > m) m = max_height(n, s);
    return m;
  endfunction

endpackage
