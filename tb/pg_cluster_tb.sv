// pg_cluster_tb: exhaustive check of the 4-bit cluster decision over all
// 2^9 values of a, b and en. The cluster must be powered exactly when en is 1
// and the operand values are not both zero.
module pg_cluster_tb;
  localparam int unsigned C = 4;
  logic [C-1:0] a, b;
  logic         en, pwr_on;
  int checks = 0, failures = 0;
  int n_sleep = 0;

  pg_cluster #(.CLUSTER(C)) dut (.a(a), .b(b), .en(en), .pwr_on(pwr_on));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * C + 1)); v++) begin
      logic exp_on;
      {en, a, b} = (2 * C + 1)'(v);
      #1;
      exp_on = en && (int'(a) + int'(b) != 0);
      if (!exp_on) n_sleep++;
      checks++;
      if (pwr_on !== exp_on) begin
        failures++;
        $display("FAIL en=%b a=%h b=%h pwr_on=%b", en, a, b, pwr_on);
      end
    end
    $display("sleep decisions: %0d", n_sleep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
