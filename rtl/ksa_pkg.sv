// ksa_pkg: types and helpers shared by the Kogge-Stone adder and its
// power-gating logic.
//
// gp_t is the (generate, propagate) pair that every prefix cell consumes and
// produces. For a single bit it is (a&b, a^b); for a span of bits i..j it is
// the group generate G[i:j] and group propagate P[i:j].
//
// The level helpers describe where the cells of the prefix network sit. The
// network treats the carry in as an extra row -1, as the cell map of the
// original 8-bit adder does, so row i holds its complete carry C[i] (its group
// term reaches down to the carry in) after level l exactly when
// i <= 2**l - 2.
package ksa_pkg;

  typedef struct packed {
    logic g;  // generate
    logic p;  // propagate
  } gp_t;

  // Number of prefix levels for an n-bit adder: ceil(log2(n)), at least 1.
  function automatic int unsigned ksa_levels(int unsigned n);
    return (n < 2) ? 1 : $clog2(n);
  endfunction

  // True when row i already holds its complete carry after level lvl
  // (level 0 = the bit generate/propagate terms).
  function automatic bit ksa_done(int i, int unsigned lvl);
    return i <= ((1 << lvl) - 2);
  endfunction

  // Prefix cells (black + gray) in an n-bit adder with carry in, including
  // the extra gray cell that merges the carry in into the carry out.
  function automatic int unsigned ksa_cells(int unsigned n);
    int unsigned cnt = 0;
    for (int unsigned l = 1; l <= ksa_levels(n); l++) begin
      for (int i = 0; i < int'(n); i++) begin
        if (i - (1 << (l - 1)) >= -1 && !ksa_done(i, l - 1)) cnt++;
      end
    end
    if (!ksa_done(int'(n) - 1, ksa_levels(n))) cnt++;
    return cnt;
  endfunction

endpackage
