// ksa_lp_run: end-to-end stimulus and checking for the low-power adder,
// shared by the testbenches that run it at different sizes.
//
// Drives a, b, cin and en (every combination when that is at most 2^20
// vectors, otherwise random vectors biased towards all-zero clusters) and
// checks, independently of the RTL:
//   - pwr_on[k] = en and (cluster k's A or B bits not all zero);
//   - en = 1: {cout, sum} = a + b + cin (the gating must be invisible);
//   - en = 0: every cluster asleep, outputs at the clamp values:
//     sum = cin, cout = 0.
// It also counts how often each mechanism of the design happened and counts
// a failure for any that never did: each cluster asleep on its own operands,
// all clusters asleep at once on all-zero operands, sleep forced by en = 0,
// a carry entering a sleeping cluster, the carry in reaching a sleeping
// lowest cluster, and each cluster waking up between two vectors.
//
// USE_DEFAULTS = 1 instantiates ksa_lp with no parameter list, so the design
// runs at its own defaults; N and CLUSTER must then match them (checked).
// The enclosing testbench reads checks and failures once done rises, prints
// the result line and ends the simulation.
module ksa_lp_run #(
  parameter int unsigned N            = 8,
  parameter int unsigned CLUSTER      = 4,
  parameter bit          USE_DEFAULTS = 1'b1
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned NC    = N / CLUSTER;
  localparam int unsigned VBITS = 2 * N + 2;
  localparam bit          EXHAUSTIVE = (VBITS <= 20);
  localparam longint unsigned NVEC = EXHAUSTIVE ? (64'd1 << VBITS) : 64'd400000;

  logic [N-1:0]  a, b, sum;
  logic          cin, en, cout;
  logic [NC-1:0] pwr_on;

  if (USE_DEFAULTS) begin : g_default
    ksa_lp dut (.a(a), .b(b), .cin(cin), .en(en), .sum(sum), .cout(cout), .pwr_on(pwr_on));
  end else begin : g_sized
    ksa_lp #(.N(N), .CLUSTER(CLUSTER)) dut (
      .a(a), .b(b), .cin(cin), .en(en), .sum(sum), .cout(cout), .pwr_on(pwr_on)
    );
  end

  int n_sleep [NC];
  int n_wake [NC];
  int n_all_zero = 0, n_en_off = 0, n_carry_into_sleep = 0, n_cin_sleep = 0;

  initial begin
    logic [NC-1:0] prev_on;
    logic [N:0]    ref_sum;
    logic [NC-1:0] exp_on;
    done = 1'b0;
    checks = 0;
    failures = 0;
    prev_on = '1;
    foreach (n_sleep[k]) begin
      n_sleep[k] = 0;
      n_wake[k]  = 0;
    end

    for (longint unsigned v = 0; v < NVEC; v++) begin
      if (EXHAUSTIVE) begin
        {en, cin, a, b} = VBITS'(v);
      end else begin
        en  = ($urandom_range(7) != 0);
        cin = 1'($urandom);
        for (int i = 0; i < int'(N); i++) begin
          a[i] = 1'($urandom);
          b[i] = 1'($urandom);
        end
        // Clear whole clusters often, so that they sleep.
        for (int k = 0; k < int'(NC); k++) begin
          if ($urandom_range(2) == 0) begin
            a[CLUSTER*k +: CLUSTER] = '0;
            b[CLUSTER*k +: CLUSTER] = '0;
          end
        end
      end
      #1;

      for (int k = 0; k < int'(NC); k++) begin
        exp_on[k] = en && ((a[CLUSTER*k +: CLUSTER] | b[CLUSTER*k +: CLUSTER]) != '0);
      end
      checks++;
      if (pwr_on !== exp_on) begin
        failures++;
        if (failures < 20) $display("FAIL pwr_on en=%b a=%h b=%h got=%b exp=%b", en, a, b, pwr_on, exp_on);
      end

      if (en) ref_sum = (N+1)'(a) + (N+1)'(b) + (N+1)'(cin);
      else    ref_sum = (N+1)'(cin);
      checks++;
      if ({cout, sum} !== ref_sum) begin
        failures++;
        if (failures < 20) $display("FAIL sum en=%b cin=%b a=%h b=%h got=%h exp=%h", en, cin, a, b, {cout, sum}, ref_sum);
      end

      // Mechanism counters.
      if (!en) n_en_off++;
      if (en && exp_on == '0) n_all_zero++;
      if (en && !exp_on[0] && cin) n_cin_sleep++;
      for (int k = 0; k < int'(NC); k++) begin
        if (en && !exp_on[k] && exp_on != '0) n_sleep[k]++;
        if (!prev_on[k] && exp_on[k]) n_wake[k]++;
        if (k > 0 && en && !exp_on[k]) begin
          logic [N-1:0] mask;
          logic [N:0]   low;
          for (int i = 0; i < int'(N); i++) mask[i] = (i < int'(CLUSTER) * k);
          low = (N+1)'(a & mask) + (N+1)'(b & mask) + (N+1)'(cin);
          if (low[CLUSTER*k]) n_carry_into_sleep++;
        end
      end
      prev_on = exp_on;
    end

    $display("vectors: %0d  (N=%0d, %0d clusters of %0d)", NVEC, N, NC, CLUSTER);
    for (int k = 0; k < int'(NC); k++) begin
      $display("cluster %0d: adaptive sleep %0d, wake-ups %0d", k, n_sleep[k], n_wake[k]);
      checks += 2;
      if (n_sleep[k] == 0 && NC > 1) failures++;
      if (n_wake[k] == 0) failures++;
    end
    $display("all clusters asleep on all-zero operands: %0d", n_all_zero);
    $display("sleep forced by en = 0: %0d", n_en_off);
    $display("carry in reaching a sleeping lowest cluster: %0d", n_cin_sleep);
    $display("carry entering a sleeping upper cluster: %0d", n_carry_into_sleep);
    checks += 4;
    if (n_all_zero == 0) failures++;
    if (n_en_off == 0) failures++;
    if (n_cin_sleep == 0) failures++;
    if (n_carry_into_sleep == 0 && NC > 1) failures++;

    done = 1'b1;
  end

  initial begin
    if (USE_DEFAULTS) begin
      assert ($bits(sum) == N && $bits(pwr_on) == NC)
        else $fatal(1, "ksa_lp_run: N/CLUSTER do not match the design's defaults");
    end
  end
endmodule
