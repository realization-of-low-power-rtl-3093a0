// ksa_bp: bit pre-processing cell of the Kogge-Stone adder ("BP").
//
// Forms the bit generate and propagate terms of one operand bit pair:
//   g = a & b,  p = a ^ b.
// The propagate term is the XOR form, so the same p also feeds the sum cell.
// Purely combinational; the equations are the standard ones of the design.
module ksa_bp
  import ksa_pkg::*;
(
  input  logic a,
  input  logic b,
  output gp_t  o
);
  always_comb begin
    o.g = a & b;
    o.p = a ^ b;
  end
endmodule
