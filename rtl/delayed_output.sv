// Delayed output: programmable pull time and drop time of the relay.
//
// Two saturating counters, advanced on each `en` strobe (one per new threshold
// decision, i.e. once per sample period):
//   True counter  : counts up while din = 1, down while din = 0, within
//                   0 .. pull_cnt.
//   False counter : counts up while din = 0, down while din = 1, within
//                   0 .. drop_cnt.
// The output becomes 1 when the True counter reaches pull_cnt and 0 when the
// False counter reaches drop_cnt; otherwise it holds. So the relay picks up
// after pull_cnt consecutive "free" decisions from rest, and drops after
// drop_cnt consecutive "occupied" decisions from a steady free state.
// The counter scheme is the design's; the update on `en`, the reset to 0 (both
// counters empty, output 0 = occupied) and the rule that a limit of 0 counts as
// reached at once are this implementation's choices. If both counters sit at
// their limits at once the output holds.
module delayed_output #(
  parameter int CNT_W = psr_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             din,
  input  logic [CNT_W-1:0] pull_cnt,
  input  logic [CNT_W-1:0] drop_cnt,
  output logic             out,
  output logic [CNT_W-1:0] true_cnt,
  output logic [CNT_W-1:0] false_cnt
);
  logic [CNT_W-1:0] t_next, f_next;

  always_comb begin
    t_next = true_cnt;
    f_next = false_cnt;
    if (din) begin
      if (true_cnt < pull_cnt) t_next = true_cnt + 1'b1;
      else                     t_next = pull_cnt;
      if (false_cnt != '0)     f_next = false_cnt - 1'b1;
      if (f_next > drop_cnt)   f_next = drop_cnt;
    end else begin
      if (false_cnt < drop_cnt) f_next = false_cnt + 1'b1;
      else                      f_next = drop_cnt;
      if (true_cnt != '0)       t_next = true_cnt - 1'b1;
      if (t_next > pull_cnt)    t_next = pull_cnt;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      true_cnt  <= '0;
      false_cnt <= '0;
      out       <= 1'b0;
    end else if (en) begin
      true_cnt  <= t_next;
      false_cnt <= f_next;
      if      ((t_next == pull_cnt) && (f_next != drop_cnt)) out <= 1'b1;
      else if ((f_next == drop_cnt) && (t_next != pull_cnt)) out <= 1'b0;
    end
  end
endmodule
