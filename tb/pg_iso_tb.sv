// pg_iso_tb: isolation cells, 8 bits wide. With on = 1 random data must pass
// unchanged; with on = 0 every output must be 0 whatever the data.
module pg_iso_tb;
  localparam int unsigned W = 8;
  logic         on;
  logic [W-1:0] d, q;
  int checks = 0, failures = 0;

  pg_iso #(.W(W)) dut (.on(on), .d(d), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      on = n[0];
      d  = (n < 2) ? '1 : W'($urandom);
      #1;
      checks++;
      if (q !== (on ? d : W'(0))) begin
        failures++;
        $display("FAIL on=%b d=%h q=%h", on, d, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
