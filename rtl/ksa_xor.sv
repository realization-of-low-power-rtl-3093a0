// ksa_xor: sum post-processing cell of the Kogge-Stone adder.
//
// Sum bit i is the bit propagate term XOR the carry into the bit:
//   s = p_i ^ C_(i-1), with C_(-1) the adder's carry in.
// Purely combinational.
module ksa_xor (
  input  logic p,
  input  logic c,
  output logic s
);
  always_comb s = p ^ c;
endmodule
