// One receiver channel driven through a sequence of track situations; used by
// tb_psr_channel at several sizes and track frequencies. A track model feeds
// the two converters through five situations:
//   free       rail 20000 LSB at +90 deg against the reference  -> pull
//   shunted    rail amplitude 1000 (axle short circuit)          -> drop
//   free again                                                   -> pull
//   weak       rail 8000: torque between the thresholds          -> holds
//   reversed   rail at -120 deg: negative torque                 -> drop
// Once the buffer holds only samples of the current situation, amplitudes,
// phase difference and torque are compared with values worked out from the
// signal parameters (psr_tb_pkg), and the threshold decision with the expected
// torque. The pull and drop delays must be exactly pull_cnt and drop_cnt
// results, the buffer must fill after N samples, and every computation must
// take the same number of cycles, less than one sample period. `done` rises at
// the end with the counts of checks and failures.
module psr_channel_scenario
  import psr_pkg::*;
  import psr_tb_pkg::*;
#(
  parameter int N         = 64,
  parameter int FS        = 320,
  parameter int PERIOD    = 400,
  parameter int SIGNAL_HZ = 75
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int CLK_HZ = FS * PERIOD;
  localparam int PULL = 3, DROP = 5;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  logic sclk, scs, sad1, sad2, relay_out, result_valid, filled, overrun;
  chan_result_t result;
  torque_t thr_high, thr_low;
  logic [CNT_W-1:0] pull_cnt = CNT_W'(PULL), drop_cnt = CNT_W'(DROP);
  real amp_rail = 20000.0, ph_rail = 90.0, amp_ref = 20000.0, ph_ref = 0.0;
  int n_samples;
  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end

  psr_channel #(.N(N), .CLK_HZ(CLK_HZ), .FS_HZ(FS), .SIGNAL_HZ(SIGNAL_HZ)) dut (.*);
  psr_stimulus #(.FS_HZ(FS), .SIGNAL_HZ(SIGNAL_HZ)) stim (
    .sclk, .scs, .amp_rail, .ph_rail_deg(ph_rail), .amp_ref, .ph_ref_deg(ph_ref),
    .sad1, .sad2, .n_samples);

  always #5 clk = ~clk;

  real wsum, m_free;
  int  n_change = 0, n_results = 0;
  int  run1 = 0, run0 = 0;
  int  n_pull = 0, n_drop = 0, n_hold = 0, n_left = 0, n_rot_pre = 0, n_steady = 0;
  int  cyc = 0, t_acq = 0, lat0 = -1, fill_at = -1;
  logic prev_relay = 1'b0, prev_filled = 1'b0;

  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge scs) t_acq = cyc;

  task automatic check_close(input string what, input real got, input real exp, input real tol);
    checks++;
    if (fabs(got - exp) > tol) begin
      failures++;
      $display("%0d Hz sample %0d %s: %f expected %f", SIGNAL_HZ, n_samples, what, got, exp);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && filled && !prev_filled) fill_at = n_samples;
    prev_filled = filled;
    checks += 0;
    if (rst_n && overrun) begin failures++; $display("overrun"); end
    if (result_valid) begin
      real ea, er, em, dph, eph;
      n_results++;
      // constant computation time, shorter than a sample period
      if (lat0 < 0) lat0 = cyc - t_acq;
      checks++;
      if (cyc - t_acq != lat0 || lat0 >= PERIOD) begin
        failures++; $display("computation took %0d cycles (first %0d)", cyc - t_acq, lat0);
      end
      if (fabs(ang_deg(result.ph_rail)) >= 90.0 || fabs(ang_deg(result.ph_ref)) >= 90.0) n_left++;
      eph = ph_rail - ph_ref;
      if (fabs(eph) > 90.0) n_rot_pre++;
      if (n_samples - n_change > N + 3) begin
        n_steady++;
        ea = exp_amp(amp_rail, N, wsum);
        er = exp_amp(amp_ref, N, wsum);
        em = exp_torque(ea, er, eph);
        check_close("amp_rail", real'(result.amp_rail), ea, 0.02 * ea + 3.0);
        check_close("amp_ref", real'(result.amp_ref), er, 0.02 * er + 3.0);
        dph = ang_deg(result.ph_rail - result.ph_ref);
        check_close("phase difference", dph, eph, (amp_rail < 5000.0) ? 5.0 : 1.0);
        check_close("torque", real'(result.torque), em, 0.04 * fabs(m_free) * (amp_rail / 20000.0) + 1.0e6);
        if (em > real'(thr_high)) begin
          checks++;
          if (!result.thr_out) begin failures++; $display("sample %0d thr_out 0 for high torque", n_samples); end
        end else if (em < real'(thr_low)) begin
          checks++;
          if (result.thr_out) begin failures++; $display("sample %0d thr_out 1 for low torque", n_samples); end
        end
      end
      if (result.torque <= thr_high && result.torque >= thr_low) n_hold++;
      // pull / drop delay, counted in results
      if (result.thr_out) begin run1++; run0 = 0; end else begin run0++; run1 = 0; end
      if (result.relay_out && !prev_relay) begin
        n_pull++;
        checks++;
        if (run1 != PULL) begin failures++; $display("pulled after %0d free decisions", run1); end
      end
      if (!result.relay_out && prev_relay) begin
        n_drop++;
        checks++;
        if (run0 != DROP) begin failures++; $display("dropped after %0d occupied decisions", run0); end
      end
      prev_relay = result.relay_out;
    end
  end

  task automatic situation(input real a_rail, input real p_rail, input int samples,
                           input logic exp_relay, input string name);
    amp_rail = a_rail;
    ph_rail  = p_rail;
    n_change = n_samples;
    wait (n_samples >= n_change + samples);
    @(posedge clk);
    checks++;
    if (relay_out != exp_relay) begin
      failures++; $display("%s: relay_out %0b expected %0b", name, relay_out, exp_relay);
    end
  endtask

  initial begin
    wsum   = window_sum(N);
    m_free = exp_torque(exp_amp(20000.0, N, wsum), exp_amp(20000.0, N, wsum), 90.0);
    thr_high = torque_t'(longint'(0.5 * m_free));
    thr_low  = torque_t'(longint'(0.3 * m_free));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    situation(20000.0,   90.0, 2 * N + 10, 1'b1, "free");
    situation( 1000.0,   90.0, N + 10,     1'b0, "shunted");
    situation(20000.0,   90.0, N + 10,     1'b1, "free again");
    situation( 8000.0,   90.0, N + 10,     1'b1, "weak");
    situation(20000.0, -120.0, N + 10,     1'b0, "reversed");
    checks += 7;
    if (fill_at < N - 1 || fill_at > N + 1) begin failures++; $display("buffer filled at sample %0d", fill_at); end
    if (n_pull != 2) begin failures++; $display("%0d pulls", n_pull); end
    if (n_drop != 2) begin failures++; $display("%0d drops", n_drop); end
    if (n_hold == 0) begin failures++; $display("hysteresis band never reached"); end
    if (n_left == 0) begin failures++; $display("no vector in the left half plane"); end
    if (n_rot_pre == 0) begin failures++; $display("no phase difference beyond 90 deg"); end
    if (n_steady < 60) begin failures++; $display("only %0d steady results", n_steady); end
    $display("%0d Hz, N = %0d: results %0d steady %0d pulls %0d drops %0d hold %0d left %0d rot %0d latency %0d",
             SIGNAL_HZ, N, n_results, n_steady, n_pull, n_drop, n_hold, n_left, n_rot_pre, lat0);
    done = 1'b1;
  end
endmodule
