// Full-size testbench of psr_top with every parameter at its default: 1024
// sample buffers, 5120 samples/s, 75 Hz track signal (bin 15), 20.48 MHz clock.
// One complete operation: the buffers fill, the relay picks up on a free track
// (rail at +90 degrees against the reference), then an axle shunts the track
// (rail amplitude down to 1/20) and the relay drops. Checked: the buffer fills
// after 1024 samples, amplitudes and torque match the values worked out from
// the signals, each computation ends within one sample period, the pull and
// drop delays are exact, track_free follows, and the channels always agree.
module tb_psr_top_full;
  import psr_pkg::*;
  import psr_tb_pkg::*;
  localparam int N = 1024, FS = 5120, PERIOD = 4000;
  localparam int PULL = 4, DROP = 6;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  logic sclk_a, scs_a, sad1_a, sad2_a, sclk_b, scs_b, sad1_b, sad2_b;
  torque_t thr_high, thr_low, tol_torque;
  logic [CNT_W-1:0] pull_cnt = CNT_W'(PULL), drop_cnt = CNT_W'(DROP);
  logic [AMP_W-1:0] tol_amp = AMP_W'(8);
  angle_t tol_phase = angle_t'(91);
  logic track_free, relay_out_a, relay_out_b, result_valid, mismatch, fault, filled, overrun;
  chan_result_t result_a, result_b;
  real amp_rail = 20000.0, ph_rail = 90.0, amp_ref = 20000.0, ph_ref = 0.0;
  int n_a, n_b;
  int checks = 0, failures = 0;

  psr_top dut (.*);
  psr_stimulus #(.FS_HZ(FS), .SIGNAL_HZ(75.0), .NOISE(0)) stim_a (
    .sclk(sclk_a), .scs(scs_a), .amp_rail, .ph_rail_deg(ph_rail), .amp_ref,
    .ph_ref_deg(ph_ref), .sad1(sad1_a), .sad2(sad2_a), .n_samples(n_a));
  psr_stimulus #(.FS_HZ(FS), .SIGNAL_HZ(75.0), .NOISE(0)) stim_b (
    .sclk(sclk_b), .scs(scs_b), .amp_rail, .ph_rail_deg(ph_rail), .amp_ref,
    .ph_ref_deg(ph_ref), .sad1(sad1_b), .sad2(sad2_b), .n_samples(n_b));

  always #5 clk = ~clk;

  real wsum, m_free;
  int  n_change = 0, run1 = 0, run0 = 0, fill_at = -1, n_pull = 0, n_drop = 0, n_steady = 0;
  int  cyc = 0, t_acq = 0, lat_max = 0;
  logic prev_relay = 1'b0, prev_filled = 1'b0;

  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge scs_a) t_acq = cyc;

  task automatic check_close(input string what, input real got, input real exp, input real tol);
    checks++;
    if (fabs(got - exp) > tol) begin
      failures++;
      $display("sample %0d %s: %f expected %f", n_a, what, got, exp);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && filled && !prev_filled) fill_at = n_a;
    prev_filled = filled;
    if (rst_n && (overrun || mismatch)) begin failures++; $display("overrun or mismatch at sample %0d", n_a); end
    if (result_valid) begin
      real ea, er;
      if (cyc - t_acq > lat_max) lat_max = cyc - t_acq;
      if (n_a - n_change > N + 3) begin
        n_steady++;
        ea = exp_amp(amp_rail, N, wsum);
        er = exp_amp(amp_ref, N, wsum);
        check_close("amp_rail", real'(result_a.amp_rail), ea, 0.01 * ea + 3.0);
        check_close("amp_ref", real'(result_a.amp_ref), er, 0.01 * er + 3.0);
        check_close("phase difference", ang_deg(result_a.ph_rail - result_a.ph_ref),
                    ph_rail - ph_ref, (amp_rail < 5000.0) ? 2.0 : 0.5);
        check_close("torque", real'(result_a.torque), exp_torque(ea, er, ph_rail - ph_ref),
                    0.03 * fabs(m_free) * (amp_rail / 20000.0) + 1.0e7);
      end
      if (result_a.thr_out) begin run1++; run0 = 0; end else begin run0++; run1 = 0; end
      if (result_a.relay_out && !prev_relay) begin
        n_pull++; checks++;
        if (run1 != PULL) begin failures++; $display("pulled after %0d free decisions", run1); end
      end
      if (!result_a.relay_out && prev_relay) begin
        n_drop++; checks++;
        if (run0 != DROP) begin failures++; $display("dropped after %0d occupied decisions", run0); end
      end
      prev_relay = result_a.relay_out;
    end
  end

  task automatic situation(input real a_rail, input int samples, input logic exp_free, input string name);
    amp_rail = a_rail;
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
    situation(20000.0, N + 24, 1'b1, "free");
    situation( 1000.0, N + 16, 1'b0, "shunted");
    checks += 5;
    if (fill_at < N - 1 || fill_at > N + 1) begin failures++; $display("buffer filled at sample %0d", fill_at); end
    if (n_pull != 1) begin failures++; $display("%0d pulls", n_pull); end
    if (n_drop != 1) begin failures++; $display("%0d drops", n_drop); end
    if (n_steady < 20) begin failures++; $display("only %0d steady results", n_steady); end
    if (lat_max >= PERIOD) begin failures++; $display("computation took %0d cycles", lat_max); end
    $display("fill at %0d, pulls %0d, drops %0d, steady results %0d, longest computation %0d cycles",
             fill_at, n_pull, n_drop, n_steady, lat_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PERIOD * (3 * N + 200)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
