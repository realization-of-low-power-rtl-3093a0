// ksa_xor_tb: exhaustive check of the sum cell: the sum bit is the low bit of
// p + c.
module ksa_xor_tb;
  logic p, c, s;
  int checks = 0, failures = 0;

  ksa_xor dut (.p(p), .c(c), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic [1:0] t;
      {p, c} = 2'(v);
      #1;
      t = 2'(p) + 2'(c);
      checks++;
      if (s !== t[0]) begin
        failures++;
        $display("FAIL p=%b c=%b s=%b", p, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
