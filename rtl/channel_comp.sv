// Channel comparison: the reciprocal check of the two identical channels.
//
// The receiver is built as two channels that compute the same thing; this block
// compares what they offer (chan_result_t): rail and reference amplitudes,
// both phases, the torque, the threshold decision, the delayed output and, as
// internal states, the pull/drop counters and the sequencer state. These exact
// items must be equal in every cycle, which also catches channels that fall out
// of step. The numeric
// items are compared whenever both channels present a new result (`valid_a` and
// `valid_b` together) and may differ by at most the given tolerance, because two
// channels with their own converters never see bit-identical samples; tolerance
// 0 asks for exact equality. Phases are compared modulo one turn.
// `mismatch` flags a difference in the current cycle; `fault` is set by the
// first one and held until reset. Which items are compared follows the design;
// the tolerances, the sticky fault and the check timing are this
// implementation's choices.
module channel_comp
  import psr_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  chan_result_t     res_a,
  input  chan_result_t     res_b,
  input  logic             valid_a,
  input  logic             valid_b,
  input  logic [AMP_W-1:0] tol_amp,
  input  angle_t           tol_phase,
  input  torque_t          tol_torque,
  output logic             mismatch,
  output logic             fault
);
  function automatic logic amp_differs(input logic [AMP_W-1:0] a, input logic [AMP_W-1:0] b);
    return ((a > b) ? (a - b) : (b - a)) > tol_amp;
  endfunction

  function automatic logic phase_differs(input angle_t a, input angle_t b);
    angle_t d;
    d = a - b;                              // wraps modulo one turn
    if (d[ANG_W-1]) d = -d;                 // |difference|
    return d > tol_phase;
  endfunction

  function automatic logic torque_differs(input torque_t a, input torque_t b);
    logic signed [M_W:0] d;
    d = {a[M_W-1], a} - {b[M_W-1], b};
    if (d < 0) d = -d;
    return d > {1'b0, tol_torque};
  endfunction

  logic bin_diff, num_diff;

  always_comb begin
    bin_diff = (res_a.thr_out != res_b.thr_out) ||
               (res_a.relay_out != res_b.relay_out) ||
               (res_a.true_cnt != res_b.true_cnt) ||
               (res_a.false_cnt != res_b.false_cnt) ||
               (res_a.state != res_b.state) ||
               (valid_a != valid_b);
    num_diff = 1'b0;
    if (valid_a && valid_b)
      num_diff = amp_differs(res_a.amp_rail, res_b.amp_rail) ||
                 amp_differs(res_a.amp_ref,  res_b.amp_ref)  ||
                 phase_differs(res_a.ph_rail, res_b.ph_rail) ||
                 phase_differs(res_a.ph_ref,  res_b.ph_ref)  ||
                 torque_differs(res_a.torque, res_b.torque);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mismatch <= 1'b0;
      fault    <= 1'b0;
    end else begin
      mismatch <= bin_diff || num_diff;
      if (bin_diff || num_diff) fault <= 1'b1;
    end
  end
endmodule
