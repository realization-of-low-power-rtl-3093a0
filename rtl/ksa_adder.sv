// ksa_adder: N-bit Kogge-Stone adder with carry in, carry out and per-row
// isolation for power gating.
//
// Three stages:
//   1. Pre-processing: one ksa_bp per bit gives g_i = a_i & b_i and
//      p_i = a_i ^ b_i.
//   2. Prefix network: ceil(log2 N) levels. At level l row i combines its
//      group term with the one of row i - 2**(l-1). The carry in acts as row
//      -1, so:
//        - partner is row -1 (the carry in) or a row that already holds its
//          complete carry: gray cell (ksa_gg), the row now holds C_i;
//        - partner still holds a group term: black cell (ksa_gp);
//        - row already holds its complete carry: wire.
//      After the last level rows 0..N-2 hold C_0..C_(N-2). If row N-1 is not
//      complete yet, one more gray cell merges the carry in into it to give
//      the carry out.
//   3. Post-processing: one ksa_xor per bit, s_i = p_i ^ C_(i-1), with
//      C_(-1) = cin.
// For N = 8 this is the cell map of the original 8-bit adder: 8 + 7 + 5
// prefix cells on three levels plus the carry-out cell. The textbook count of
// n*log2(n) - n + 1 = 17 cells is for a network without carry in.
//
// Power domains: all BP and prefix cells of bit row i (and the carry-out cell
// for row N-1) belong to row i's domain. Every signal that leaves the row,
// to another row or to the sum cells, passes a pg_iso cell that forces it to 0
// while row_on[i] = 0. The sum cells are always on. Tie row_on to all ones
// for a plain adder. Fully combinational: the critical path is BP, L prefix
// cells and the sum XOR.
module ksa_adder
  import ksa_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  input  logic [N-1:0] row_on,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned L = ksa_levels(N);

  // g_lvl[l].v[i]: group term held by row i after level l, inside row i's
  //                domain (level 0 = the bit terms).
  // g_lvl[l].x[i]: the same term as seen from outside row i (isolated).
  for (genvar l = 0; l <= int'(L); l++) begin : g_lvl
    localparam int D = (l == 0) ? 0 : (1 << (l - 1));
    gp_t v [N];
    gp_t x [N];

    for (genvar i = 0; i < int'(N); i++) begin : g_row
      localparam int J = i - D;
      if (l == 0) begin : g_bp
        // Pre-processing.
        ksa_bp u_bp (.a(a[i]), .b(b[i]), .o(v[i]));
      end else if (ksa_done(i, l - 1)) begin : g_wire
        assign v[i] = g_lvl[l-1].v[i];
      end else if (J == -1) begin : g_gg_cin
        ksa_gg u_gg (.hi(g_lvl[l-1].v[i]), .g_lo(cin), .g(v[i].g));
        assign v[i].p = 1'b0;
      end else if (ksa_done(J, l - 1)) begin : g_gg
        ksa_gg u_gg (.hi(g_lvl[l-1].v[i]), .g_lo(g_lvl[l-1].x[J].g), .g(v[i].g));
        assign v[i].p = 1'b0;
      end else begin : g_gp
        ksa_gp u_gp (.hi(g_lvl[l-1].v[i]), .lo(g_lvl[l-1].x[J]), .o(v[i]));
      end

      // Isolation of the row's output at this level.
      pg_iso #(.W($bits(gp_t))) u_iso (.on(row_on[i]), .d(v[i]), .q(x[i]));
    end
  end

  // Carry out, in row N-1's domain.
  logic cout_raw;
  if (ksa_done(int'(N) - 1, L)) begin : g_cout_wire
    assign cout_raw = g_lvl[L].v[N-1].g;
  end else begin : g_cout_gg
    ksa_gg u_gg (.hi(g_lvl[L].v[N-1]), .g_lo(cin), .g(cout_raw));
  end
  pg_iso #(.W(1)) u_iso_cout (.on(row_on[N-1]), .d(cout_raw), .q(cout));

  // Post-processing (always on).
  for (genvar i = 0; i < int'(N); i++) begin : g_sum
    if (i == 0) begin : g_s0
      ksa_xor u_xor (.p(g_lvl[0].x[0].p), .c(cin), .s(sum[0]));
    end else begin : g_si
      ksa_xor u_xor (.p(g_lvl[0].x[i].p), .c(g_lvl[L].x[i-1].g), .s(sum[i]));
    end
  end
endmodule
