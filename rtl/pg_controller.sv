// pg_controller: adaptive power-gating controller of the N-bit adder.
//
// The adder's bit rows are grouped into N/CLUSTER clusters, cluster k holding
// bits CLUSTER*k .. CLUSTER*k+CLUSTER-1. Each cluster has its own pg_cluster
// decision, so a cluster whose operand bits are all zero sleeps while the
// others keep working; en = 0 puts every cluster to sleep. pwr_on[k] = 1
// means cluster k is powered (its header switches on, its isolation cells
// transparent). Combinational: pwr_on follows a, b and en within the same
// cycle of whatever logic drives the adder.
//
// For the 8-bit adder this gives the two clusters of the original design.
module pg_controller #(
  parameter int unsigned N       = 8,
  parameter int unsigned CLUSTER = 4
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  input  logic                 en,
  output logic [N/CLUSTER-1:0] pwr_on
);
  localparam int unsigned NC = N / CLUSTER;

  for (genvar k = 0; k < int'(NC); k++) begin : g_cluster
    pg_cluster #(.CLUSTER(CLUSTER)) u_cluster (
      .a     (a[CLUSTER*k +: CLUSTER]),
      .b     (b[CLUSTER*k +: CLUSTER]),
      .en    (en),
      .pwr_on(pwr_on[k])
    );
  end

  initial begin
    assert (N % CLUSTER == 0)
      else $error("pg_controller: N must be a multiple of CLUSTER");
  end
endmodule
