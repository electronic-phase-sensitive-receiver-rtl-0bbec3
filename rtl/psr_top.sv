// Electronic phase sensitive receiver: two identical channels and their
// reciprocal comparison.
//
// Each channel (psr_channel) has its own pair of serial A/D converters for the
// rail and the reference signal and computes, once per sample, the relay torque
// M = A_rail * A_ref * sin(phi_rail - phi_ref), thresholds it with hysteresis
// and delays the decision by the programmable pull and drop times. The channel
// comparison (channel_comp) checks that both channels agree.
// `track_free` is 1 only when both channels report the segment free and no
// disagreement has been seen since reset; any fault thus gives "occupied", the
// safe indication. This combination rule is this implementation's choice.
// Both channels share the clock, the reset and the settings (thresholds,
// pull/drop counts, comparison tolerances). The settings' source (switches, a
// display and push buttons on the board) is left outside this RTL.
module psr_top
  import psr_pkg::*;
#(
  parameter int N          = 1024,
  parameter int CLK_HZ     = 20_480_000,
  parameter int FS_HZ      = 5_120,
  parameter int SIGNAL_HZ  = 75,
  parameter int SCLK_DIV   = 4,
  parameter int CONV_TICKS = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // channel A converters
  output logic             sclk_a,
  output logic             scs_a,
  input  logic             sad1_a,
  input  logic             sad2_a,
  // channel B converters
  output logic             sclk_b,
  output logic             scs_b,
  input  logic             sad1_b,
  input  logic             sad2_b,
  // settings
  input  torque_t          thr_high,
  input  torque_t          thr_low,
  input  logic [CNT_W-1:0] pull_cnt,
  input  logic [CNT_W-1:0] drop_cnt,
  input  logic [AMP_W-1:0] tol_amp,
  input  angle_t           tol_phase,
  input  torque_t          tol_torque,
  // results
  output logic             track_free,
  output logic             relay_out_a,
  output logic             relay_out_b,
  output chan_result_t     result_a,
  output chan_result_t     result_b,
  output logic             result_valid,
  output logic             mismatch,
  output logic             fault,
  output logic             filled,
  output logic             overrun
);
  logic valid_a, valid_b, filled_a, filled_b, overrun_a, overrun_b;

  psr_channel #(.N(N), .CLK_HZ(CLK_HZ), .FS_HZ(FS_HZ), .SIGNAL_HZ(SIGNAL_HZ),
                .SCLK_DIV(SCLK_DIV), .CONV_TICKS(CONV_TICKS)) u_ch_a (
    .clk, .rst_n, .sclk(sclk_a), .scs(scs_a), .sad1(sad1_a), .sad2(sad2_a),
    .thr_high, .thr_low, .pull_cnt, .drop_cnt,
    .relay_out(relay_out_a), .result(result_a), .result_valid(valid_a),
    .filled(filled_a), .overrun(overrun_a)
  );

  psr_channel #(.N(N), .CLK_HZ(CLK_HZ), .FS_HZ(FS_HZ), .SIGNAL_HZ(SIGNAL_HZ),
                .SCLK_DIV(SCLK_DIV), .CONV_TICKS(CONV_TICKS)) u_ch_b (
    .clk, .rst_n, .sclk(sclk_b), .scs(scs_b), .sad1(sad1_b), .sad2(sad2_b),
    .thr_high, .thr_low, .pull_cnt, .drop_cnt,
    .relay_out(relay_out_b), .result(result_b), .result_valid(valid_b),
    .filled(filled_b), .overrun(overrun_b)
  );

  channel_comp u_comp (
    .clk, .rst_n, .res_a(result_a), .res_b(result_b), .valid_a, .valid_b,
    .tol_amp, .tol_phase, .tol_torque, .mismatch, .fault
  );

  assign track_free   = relay_out_a & relay_out_b & ~fault;
  assign result_valid = valid_a;
  assign overrun      = overrun_a | overrun_b;
  assign filled       = filled_a & filled_b;
endmodule
