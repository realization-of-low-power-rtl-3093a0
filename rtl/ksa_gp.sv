// ksa_gp: black prefix cell of the Kogge-Stone adder ("GP").
//
// Merges the group term of an upper span with that of the adjacent lower span:
//   G = G_hi | (P_hi & G_lo),  P = P_hi & P_lo.
// Used wherever the lower span does not yet reach the carry in, so the group
// propagate is still needed by later levels. Purely combinational.
module ksa_gp
  import ksa_pkg::*;
(
  input  gp_t hi,
  input  gp_t lo,
  output gp_t o
);
  always_comb begin
    o.g = hi.g | (hi.p & lo.g);
    o.p = hi.p & lo.p;
  end
endmodule
