// ksa_lp_tb: end-to-end test of the low-power adder at its default size
// (8 bits, two 4-bit clusters), every combination of a, b, cin and en.
// See ksa_lp_run for what is checked and counted.
module ksa_lp_tb;
  logic done;
  int   checks, failures;

  ksa_lp_run #(.N(8), .CLUSTER(4), .USE_DEFAULTS(1'b1)) run (.done(done), .checks(checks), .failures(failures));

  // Watchdog: a hung run counts as a failure.
  initial begin
    #50000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;  // let the run clear done first
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
