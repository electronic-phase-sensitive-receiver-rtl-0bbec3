// One-point DFT: X = sum_i x_i * (c_i - j*s_i) over one sample buffer.
//
// After a `start` pulse the unit sweeps `idx` from 0 to N-1, one index per cycle.
// The caller turns idx into a RAM address and a ROM address; both memories answer
// one cycle later on `x`, `c` and `s`, and the unit multiplies and accumulates
// re += x*c and im -= x*s in full precision (two multipliers). `done` pulses one
// cycle after the last product has been accumulated, i.e. N+2 cycles after
// `start`, and `re`/`im` then hold the result until the next start. The
// coefficients carry the window, so this is a windowed DFT bin of the buffer.
module dft1 #(
  parameter int N        = 1024,
  parameter int SAMPLE_W = psr_pkg::SAMPLE_W,
  parameter int COEF_W   = psr_pkg::COEF_W,
  parameter int ACC_W    = SAMPLE_W + COEF_W + $clog2(N)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic [$clog2(N)-1:0]       idx,
  output logic                       busy,
  input  logic signed [SAMPLE_W-1:0] x,
  input  logic signed [COEF_W-1:0]   c,
  input  logic signed [COEF_W-1:0]   s,
  output logic signed [ACC_W-1:0]    re,
  output logic signed [ACC_W-1:0]    im,
  output logic                       done
);
  localparam int AW = $clog2(N);

  logic running, rd_valid, rd_last;
  logic signed [SAMPLE_W+COEF_W-1:0] pc, ps;

  assign busy = running | rd_valid;
  assign pc   = x * c;
  assign ps   = x * s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      idx      <= '0;
      rd_valid <= 1'b0;
      rd_last  <= 1'b0;
      re       <= '0;
      im       <= '0;
      done     <= 1'b0;
    end else begin
      rd_valid <= running;
      rd_last  <= running && (idx == AW'(N - 1));
      done     <= rd_last;
      if (start) begin
        running <= 1'b1;
        idx     <= '0;
        re      <= '0;
        im      <= '0;
      end else if (running) begin
        idx <= idx + 1'b1;
        if (idx == AW'(N - 1)) running <= 1'b0;
      end
      if (rd_valid && !start) begin
        re <= re + ACC_W'(pc);
        im <= im - ACC_W'(ps);
      end
    end
  end
endmodule
