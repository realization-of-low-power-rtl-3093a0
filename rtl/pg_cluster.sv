// pg_cluster: power-gating decision for one cluster of CLUSTER adder bits.
//
// A cluster is kept powered only while the controller is enabled (en = 1) and
// at least one of its operand bits is 1. When every A and B bit of the
// cluster is 0 the cluster's prefix cells would only hold zeros, so it is
// switched off to cut its leakage. The decision is a tree: CLUSTER/2 pg_basic
// detectors look at two bit pairs each, their results are merged, and the
// merged activity is qualified by en. The result drives the cluster's header
// power switches and its isolation cells. Combinational, no state.
//
// The 4-bit cluster, the 2-bit detector blocks and the en input follow the
// original design; the all-zero sleep condition is this design's reading of
// it. CLUSTER must be even.
module pg_cluster #(
  parameter int unsigned CLUSTER = 4
) (
  input  logic [CLUSTER-1:0] a,
  input  logic [CLUSTER-1:0] b,
  input  logic               en,
  output logic               pwr_on
);
  localparam int unsigned NB = CLUSTER / 2;

  logic [NB-1:0] act;

  for (genvar k = 0; k < int'(NB); k++) begin : g_basic
    pg_basic u_basic (
      .a(a[2*k +: 2]),
      .b(b[2*k +: 2]),
      .x(act[k])
    );
  end

  always_comb pwr_on = en & (|act);

  initial begin
    assert (CLUSTER >= 2 && CLUSTER % 2 == 0)
      else $error("pg_cluster: CLUSTER must be even and at least 2");
  end
endmodule
