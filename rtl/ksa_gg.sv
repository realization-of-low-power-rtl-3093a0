// ksa_gg: gray prefix cell of the Kogge-Stone adder ("GG").
//
// Merges an upper span's group term with a complete carry from below:
//   G = G_hi | (P_hi & G_lo).
// The result is itself a complete carry, so no group propagate is formed.
// Used where the lower input is the carry in or a row that already holds its
// carry, and for the carry out. Purely combinational.
module ksa_gg
  import ksa_pkg::*;
(
  input  gp_t  hi,
  input  logic g_lo,
  output logic g
);
  always_comb g = hi.g | (hi.p & g_lo);
endmodule
