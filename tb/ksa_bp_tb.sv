// ksa_bp_tb: exhaustive check of the bit pre-processing cell.
// All four operand pairs; expected g = a AND b, p = a XOR b worked out from
// the truth table of a 1-bit sum (g = carry, p = sum bit).
module ksa_bp_tb;
  import ksa_pkg::*;
  logic a, b;
  gp_t  o;
  int checks = 0, failures = 0;

  ksa_bp dut (.a(a), .b(b), .o(o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic [1:0] s2;
      {a, b} = 2'(v);
      #1;
      s2 = 2'(a) + 2'(b);
      checks++;
      if (o.g !== s2[1] || o.p !== s2[0]) begin
        failures++;
        $display("FAIL a=%b b=%b g=%b p=%b", a, b, o.g, o.p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
