// ksa_gg_tb: exhaustive check of the gray prefix cell against the carry rule
// "the span produces a carry if it generates one, or propagates the carry
// from below".
module ksa_gg_tb;
  import ksa_pkg::*;
  gp_t  hi;
  logic g_lo, g;
  int checks = 0, failures = 0;

  ksa_gg dut (.hi(hi), .g_lo(g_lo), .g(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic eg;
      {hi, g_lo} = 3'(v);
      #1;
      eg = hi.g ? 1'b1 : (hi.p ? g_lo : 1'b0);
      checks++;
      if (g !== eg) begin
        failures++;
        $display("FAIL hi=%b g_lo=%b g=%b", hi, g_lo, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
