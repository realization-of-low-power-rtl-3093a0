// pg_controller_tb: the 8-bit controller (two 4-bit clusters) over every a, b
// and en. pwr_on[k] must be 1 exactly when en is 1 and the 4-bit slices
// a[4k+3:4k], b[4k+3:4k] are not both zero. Each cluster must be seen
// sleeping alone at least once, to show the clusters are independent.
module pg_controller_tb;
  localparam int unsigned N = 8, C = 4, NC = N / C;
  logic [N-1:0]  a, b;
  logic          en;
  logic [NC-1:0] pwr_on;
  int checks = 0, failures = 0;
  int n_alone [NC];

  pg_controller #(.N(N), .CLUSTER(C)) dut (.a(a), .b(b), .en(en), .pwr_on(pwr_on));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_alone[k]) n_alone[k] = 0;
    for (int v = 0; v < (1 << (2 * N + 1)); v++) begin
      logic [NC-1:0] exp_on;
      {en, a, b} = (2 * N + 1)'(v);
      #1;
      for (int k = 0; k < int'(NC); k++) begin
        exp_on[k] = en && (((a >> (C * k)) & 4'hf) != 0 || ((b >> (C * k)) & 4'hf) != 0);
      end
      checks++;
      if (pwr_on !== exp_on) begin
        failures++;
        if (failures < 10) $display("FAIL en=%b a=%h b=%h pwr_on=%b exp=%b", en, a, b, pwr_on, exp_on);
      end
      for (int k = 0; k < int'(NC); k++) begin
        if (en && !exp_on[k] && (exp_on | (NC'(1) << k)) == '1) n_alone[k]++;
      end
    end
    for (int k = 0; k < int'(NC); k++) begin
      $display("cluster %0d asleep alone: %0d", k, n_alone[k]);
      checks++;
      if (n_alone[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
