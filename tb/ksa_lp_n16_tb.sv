// ksa_lp_n16_tb: the low-power adder widened to 16 bits (four 4-bit
// clusters), 400000 random vectors with whole clusters often cleared so that
// every cluster sleeps and wakes. See ksa_lp_run.
module ksa_lp_n16_tb;
  logic done;
  int   checks, failures;

  ksa_lp_run #(.N(16), .CLUSTER(4), .USE_DEFAULTS(1'b0)) run (.done(done), .checks(checks), .failures(failures));

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
