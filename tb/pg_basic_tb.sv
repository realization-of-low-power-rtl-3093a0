// pg_basic_tb: exhaustive check of the 2-bit activity detector: x must be 0
// exactly when all four operand bits are 0.
module pg_basic_tb;
  logic [1:0] a, b;
  logic       x;
  int checks = 0, failures = 0;

  pg_basic dut (.a(a), .b(b), .x(x));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b} = 4'(v);
      #1;
      checks++;
      if (x !== (v != 0)) begin
        failures++;
        $display("FAIL a=%b b=%b x=%b", a, b, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
