// ksa_lp_w4_tb: the 4-bit configuration of the low-power adder (one 4-bit
// cluster), every combination of a, b, cin and en. See ksa_lp_run.
module ksa_lp_w4_tb;
  logic done;
  int   checks, failures;

  ksa_lp_run #(.N(4), .CLUSTER(4), .USE_DEFAULTS(1'b0)) run (.done(done), .checks(checks), .failures(failures));

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
