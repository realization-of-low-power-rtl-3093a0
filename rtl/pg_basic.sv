// pg_basic: 2-bit activity detector of the adaptive power-gating controller.
//
// Looks at two operand bit pairs (a[1:0], b[1:0]) and reports x = 1 when any
// of the four bits is 1, i.e. when the adder slice they feed has work to do.
// Four of these, merged in pairs, make up the controller of the 8-bit adder.
// The block name and its ports follow the original design; the OR-reduction
// is this design's reading of its function. Combinational.
module pg_basic (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic       x
);
  always_comb x = |{a, b};
endmodule
