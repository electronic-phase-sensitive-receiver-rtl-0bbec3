// End-to-end testbench of psr_top at reduced size (N = 64, 320 samples/s,
// 75 Hz). Both channels get their own converter models fed with the same track
// signals. Situations: free, shunted, free, weak (torque inside the hysteresis
// band), reversed phase, free, and finally a fault in channel B's rail
// converter (10 % gain error). Checked: track_free follows the expected relay
// state of each situation, both channels agree until the fault, amplitudes and
// torque match the values worked out from the signals, pull and drop delays
// are exact, and the fault is caught by the channel comparison and forces
// track_free to 0. Each mechanism (buffer fill, pull, drop, hysteresis hold,
// vectoring pre-rotation, rotation pre-rotation, channel mismatch) is counted
// and must occur.
module tb_psr_top;
  import psr_pkg::*;
  import psr_tb_pkg::*;
  localparam int N = 64, FS = 320, PERIOD = 400, CLK_HZ = FS * PERIOD;
  localparam int PULL = 4, DROP = 6;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  logic sclk_a, scs_a, sad1_a, sad2_a, sclk_b, scs_b, sad1_b, sad2_b;
  torque_t thr_high, thr_low, tol_torque;
  logic [CNT_W-1:0] pull_cnt = CNT_W'(PULL), drop_cnt = CNT_W'(DROP);
  logic [AMP_W-1:0] tol_amp = AMP_W'(8);
  angle_t tol_phase = angle_t'(91);           // 0.5 degree
  logic track_free, relay_out_a, relay_out_b, result_valid, mismatch, fault, filled, overrun;
  chan_result_t result_a, result_b;
  real amp_rail = 20000.0, ph_rail = 90.0, amp_ref = 20000.0, ph_ref = 0.0, gain_b = 1.0;
  real amp_rail_b;
  int n_a, n_b;
  int checks = 0, failures = 0;

  assign amp_rail_b = amp_rail * gain_b;

  psr_top #(.N(N), .CLK_HZ(CLK_HZ), .FS_HZ(FS), .SIGNAL_HZ(75)) dut (.*);
  psr_stimulus #(.FS_HZ(FS), .SIGNAL_HZ(75.0), .NOISE(0)) stim_a (
    .sclk(sclk_a), .scs(scs_a), .amp_rail, .ph_rail_deg(ph_rail), .amp_ref,
    .ph_ref_deg(ph_ref), .sad1(sad1_a), .sad2(sad2_a), .n_samples(n_a));
  psr_stimulus #(.FS_HZ(FS), .SIGNAL_HZ(75.0), .NOISE(0)) stim_b (
    .sclk(sclk_b), .scs(scs_b), .amp_rail(amp_rail_b), .ph_rail_deg(ph_rail), .amp_ref,
    .ph_ref_deg(ph_ref), .sad1(sad1_b), .sad2(sad2_b), .n_samples(n_b));

  always #5 clk = ~clk;

  real wsum, m_free;
  int  n_change = 0, run1 = 0, run0 = 0;
  int  n_fill = 0, n_pull = 0, n_drop = 0, n_hold = 0, n_left = 0, n_rot_pre = 0;
  int  n_mismatch = 0, n_steady = 0;
  logic prev_relay = 1'b0, prev_filled = 1'b0, fault_expected = 1'b0;

  task automatic check_close(input string what, input real got, input real exp, input real tol);
    checks++;
    if (fabs(got - exp) > tol) begin
      failures++;
      $display("sample %0d %s: %f expected %f", n_a, what, got, exp);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && filled && !prev_filled) n_fill++;
    prev_filled = filled;
    if (rst_n && overrun) begin failures++; $display("overrun"); end
    if (mismatch) begin
      n_mismatch++;
      if (!fault_expected) begin failures++; $display("sample %0d: unexpected channel mismatch", n_a); end
    end
    if (result_valid) begin
      real ea, er, em, eph;
      eph = ph_rail - ph_ref;
      if (fabs(ang_deg(result_a.ph_rail)) >= 90.0 || fabs(ang_deg(result_a.ph_ref)) >= 90.0) n_left++;
      if (fabs(eph) > 90.0) n_rot_pre++;
      if (result_a.torque <= thr_high && result_a.torque >= thr_low) n_hold++;
      if (n_a - n_change > N + 3 && !fault_expected) begin
        n_steady++;
        ea = exp_amp(amp_rail, N, wsum);
        er = exp_amp(amp_ref, N, wsum);
        em = exp_torque(ea, er, eph);
        check_close("amp_rail", real'(result_a.amp_rail), ea, 0.02 * ea + 3.0);
        check_close("amp_ref", real'(result_a.amp_ref), er, 0.02 * er + 3.0);
        check_close("torque", real'(result_a.torque), em, 0.04 * fabs(m_free) * (amp_rail / 20000.0) + 1.0e6);
      end
      if (result_a.thr_out) begin run1++; run0 = 0; end else begin run0++; run1 = 0; end
      if (result_a.relay_out && !prev_relay) begin
        n_pull++;
        checks++;
        if (run1 != PULL) begin failures++; $display("pulled after %0d free decisions", run1); end
      end
      if (!result_a.relay_out && prev_relay) begin
        n_drop++;
        checks++;
        if (run0 != DROP) begin failures++; $display("dropped after %0d occupied decisions", run0); end
      end
      prev_relay = result_a.relay_out;
    end
  end

  task automatic situation(input real a_rail, input real p_rail, input int samples,
                           input logic exp_free, input string name);
    amp_rail = a_rail;
    ph_rail  = p_rail;
    n_change = n_a;
    wait (n_a >= n_change + samples);
    @(posedge clk);
    checks++;
    if (track_free != exp_free) begin
      failures++; $display("%s: track_free %0b expected %0b", name, track_free, exp_free);
    end
  endtask

  initial begin
    wsum   = window_sum(N);
    m_free = exp_torque(exp_amp(20000.0, N, wsum), exp_amp(20000.0, N, wsum), 90.0);
    thr_high   = torque_t'(longint'(0.5 * m_free));
    thr_low    = torque_t'(longint'(0.3 * m_free));
    tol_torque = torque_t'(longint'(0.005 * m_free));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    situation(20000.0,   90.0, 2 * N + 10, 1'b1, "free");
    situation( 1000.0,   90.0, N + 10,     1'b0, "shunted");
    situation(20000.0,   90.0, N + 10,     1'b1, "free again");
    situation( 8000.0,   90.0, N + 10,     1'b1, "weak");
    situation(20000.0, -120.0, N + 10,     1'b0, "reversed");
    situation(20000.0,   90.0, N + 10,     1'b1, "free");
    checks++;
    if (fault) begin failures++; $display("fault before the injected error"); end
    fault_expected = 1'b1;
    gain_b = 1.1;
    situation(20000.0,   90.0, N + 10,     1'b0, "channel B gain error");
    checks += 3;
    if (!fault) begin failures++; $display("gain error not detected"); end
    if (!relay_out_a) begin failures++; $display("channel A should still see a free track"); end
    if (n_mismatch == 0) begin failures++; $display("no mismatch cycle"); end
    checks += 6;
    if (n_fill != 1)    begin failures++; $display("buffer fill seen %0d times", n_fill); end
    if (n_pull != 3)    begin failures++; $display("%0d pulls", n_pull); end
    if (n_drop != 2)    begin failures++; $display("%0d drops", n_drop); end
    if (n_hold == 0)    begin failures++; $display("hysteresis band never reached"); end
    if (n_left == 0)    begin failures++; $display("no vector in the left half plane"); end
    if (n_rot_pre == 0) begin failures++; $display("no phase difference beyond 90 deg"); end
    $display("fill %0d pull %0d drop %0d hold %0d left %0d rot %0d mismatch %0d steady %0d",
             n_fill, n_pull, n_drop, n_hold, n_left, n_rot_pre, n_mismatch, n_steady);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PERIOD * (10 * N + 200)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
