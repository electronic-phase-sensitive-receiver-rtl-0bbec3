// Threshold logic with hysteresis on the relay torque.
//
// On each `en` strobe (one per new torque value):
//   torque > thr_high  -> out = 1   (torque large enough: segment free)
//   torque < thr_low   -> out = 0   (segment occupied)
//   otherwise          -> out keeps its value
// Two thresholds forming a hysteresis follow the design; the meaning of 1 as
// "free", the strict comparisons and the reset value 0 (occupied, the safe side)
// are this implementation's choices. thr_low should not exceed thr_high.
module threshold_hyst #(
  parameter int M_W = psr_pkg::M_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic signed [M_W-1:0] torque,
  input  logic signed [M_W-1:0] thr_high,
  input  logic signed [M_W-1:0] thr_low,
  output logic                  out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          out <= 1'b0;
    else if (en && torque > thr_high)    out <= 1'b1;
    else if (en && torque < thr_low)     out <= 1'b0;
  end
endmodule
