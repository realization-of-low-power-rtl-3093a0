// ksa_gp_tb: exhaustive check of the black prefix cell.
// Expected values come from the meaning of the group terms: the upper span
// generates a carry, or propagates the one the lower span generates; the
// merged span propagates only if both halves do.
module ksa_gp_tb;
  import ksa_pkg::*;
  gp_t hi, lo, o;
  int checks = 0, failures = 0;

  ksa_gp dut (.hi(hi), .lo(lo), .o(o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic eg, ep;
      {hi, lo} = 4'(v);
      #1;
      // Carry out of the merged span for carry in 0 and for carry in 1.
      eg = hi.g ? 1'b1 : (hi.p ? lo.g : 1'b0);
      ep = (hi.p && lo.p);
      checks++;
      if (o.g !== eg || o.p !== ep) begin
        failures++;
        $display("FAIL hi=%b lo=%b o=%b", hi, lo, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
