// ksa_lp: low-power N-bit Kogge-Stone adder with adaptive power gating.
//
// The adder (ksa_adder) is split into power-gated clusters of CLUSTER bit
// rows. The adaptive controller (pg_controller) watches the operands and
// switches a cluster off whenever all of its A and B bits are zero, and every
// cluster off when en = 0. A sleeping cluster's outputs are clamped to 0 by
// isolation cells; since those are exactly the values its cells would produce
// for all-zero operands, and the sum XORs stay powered, the sum and carry out
// are unaffected by the adaptive gating while en = 1. With en = 0 the whole
// adder sleeps and shows the clamp values: sum = {0..0, cin}, cout = 0.
//
// pwr_on[k] drives the header power switches of cluster k (1 = VDDV connected
// to VDD); the switches themselves are transistors and lie outside the RTL.
// Interface: a, b, cin in; sum, cout, pwr_on out. Fully combinational; a real
// cluster needs a wake-up time after pwr_on rises, which the surrounding logic
// must allow for and which is not modelled here.
//
// N = 8 with two 4-bit clusters is the original design; the cluster contents
// (BP and prefix cells of its rows) and the 0 clamp level are this design's
// choices.
module ksa_lp #(
  parameter int unsigned N       = 8,
  parameter int unsigned CLUSTER = 4
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  input  logic                 cin,
  input  logic                 en,
  output logic [N-1:0]         sum,
  output logic                 cout,
  output logic [N/CLUSTER-1:0] pwr_on
);
  logic [N-1:0] row_on;

  pg_controller #(.N(N), .CLUSTER(CLUSTER)) u_ctrl (
    .a(a), .b(b), .en(en), .pwr_on(pwr_on)
  );

  always_comb begin
    for (int i = 0; i < int'(N); i++) row_on[i] = pwr_on[i / CLUSTER];
  end

  ksa_adder #(.N(N)) u_adder (
    .a(a), .b(b), .cin(cin), .row_on(row_on), .sum(sum), .cout(cout)
  );
endmodule
