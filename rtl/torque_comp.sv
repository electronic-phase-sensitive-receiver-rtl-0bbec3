// Torque computation: M = I1 * I2 * sin(phi), the electronic form of the
// Ferraris relay torque M = k * I1 * I2 * sin(phi).
//
// Two pipelined multiplications, as hard FPGA multipliers do them:
//   stage 1: p = amp1 * amp2         (unsigned, 2*AMP_W bits)
//   stage 2: m = p * sin_phi         (signed, 2*AMP_W + SIN_W bits, exact)
// `done` pulses two cycles after `start`, with `m` valid; m holds until the next
// start. The scale factor k of the relay and the CORDIC gains stay in the
// result; the thresholds that follow are set in the same units.
module torque_comp #(
  parameter int AMP_W = psr_pkg::AMP_W,
  parameter int SIN_W = psr_pkg::SIN_W
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  input  logic [AMP_W-1:0]                amp1,
  input  logic [AMP_W-1:0]                amp2,
  input  logic signed [SIN_W-1:0]         sin_phi,
  output logic signed [2*AMP_W+SIN_W-1:0] m,
  output logic                            done
);
  logic [2*AMP_W-1:0]     p;
  logic signed [SIN_W-1:0] s_q;
  logic                   v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p    <= '0;
      s_q  <= '0;
      v1   <= 1'b0;
      m    <= '0;
      done <= 1'b0;
    end else begin
      v1   <= start;
      done <= v1;
      if (start) begin
        p   <= amp1 * amp2;
        s_q <= sin_phi;
      end
      if (v1) m <= $signed({1'b0, p}) * s_q;
    end
  end
endmodule
