// pg_iso: isolation cells at the boundary of a power-gated domain.
//
// While the domain is powered (on = 1) its W outputs pass unchanged; while it
// sleeps its virtual supply floats and its outputs are undefined, so they are
// forced to a valid level before they reach always-on logic. The clamp level
// is 0 in this design, which is also the value the gated adder cells produce
// when their operand bits are all zero. One AND-type clamp per bit,
// combinational.
module pg_iso #(
  parameter int unsigned W = 1
) (
  input  logic         on,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_comb q = on ? d : '0;
endmodule
