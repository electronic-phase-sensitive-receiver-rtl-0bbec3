// Testbench of psr_channel: runs the track situations of psr_channel_scenario
// on two channel configurations at once,
//   75 Hz  with N = 64,  320 samples/s  (bin 15, as in the full-size design)
//   275 Hz with N = 256, 1280 samples/s (bin 55, as at full size)
// and reports the sum of their checks.
module tb_psr_channel;
  logic done75, done275;
  int   checks75, failures75, checks275, failures275;
  int   checks = 0, failures = 0;

  psr_channel_scenario #(.N(64), .FS(320), .PERIOD(400), .SIGNAL_HZ(75)) s75 (
    .done(done75), .checks(checks75), .failures(failures75));
  psr_channel_scenario #(.N(256), .FS(1280), .PERIOD(800), .SIGNAL_HZ(275)) s275 (
    .done(done275), .checks(checks275), .failures(failures275));

  initial begin
    wait (done75 && done275);
    checks   = checks75 + checks275;
    failures = failures75 + failures275;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 800 * (8 * 256 + 100));
    failures = failures75 + failures275 + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks75 + checks275, failures);
    $finish;
  end
endmodule
