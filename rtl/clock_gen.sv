// Clock generator: timing strobes for the sample clock and the serial A/D clock.
//
// The whole channel runs on one master clock `clk`. Instead of generating derived
// clocks, this block divides `clk` into one-cycle enable strobes:
//   sample_tick : one pulse every CLK_HZ/FS_HZ cycles, starts one A/D conversion
//                 on both converters (the sample clock).
//   bit_tick    : one pulse every SCLK_DIV cycles; the A/D controller toggles the
//                 serial clock sclk on each, so sclk = clk / (2*SCLK_DIV).
// The state machines use `clk` itself. The defaults give 5120 samples/s, which
// with the 1024-sample buffer yields the 5 Hz frequency resolution of the design;
// the 20.48 MHz master clock and the divider are this implementation's choice.
// The first sample_tick comes SAMPLE_DIV cycles after reset.
module clock_gen #(
  parameter int CLK_HZ   = 20_480_000,
  parameter int FS_HZ    = 5_120,
  parameter int SCLK_DIV = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic sample_tick,
  output logic bit_tick
);
  localparam int SAMPLE_DIV = CLK_HZ / FS_HZ;
  localparam int SW = $clog2(SAMPLE_DIV + 1);
  localparam int BW = $clog2(SCLK_DIV + 1);

  initial begin
    assert (SAMPLE_DIV >= 2 && CLK_HZ % FS_HZ == 0)
      else $error("clock_gen: CLK_HZ must be a multiple of FS_HZ");
    assert (SCLK_DIV >= 1) else $error("clock_gen: SCLK_DIV must be >= 1");
  end

  logic [SW-1:0] scnt;
  logic [BW-1:0] bcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scnt        <= '0;
      bcnt        <= '0;
      sample_tick <= 1'b0;
      bit_tick    <= 1'b0;
    end else begin
      sample_tick <= (scnt == SW'(SAMPLE_DIV - 1));
      scnt        <= (scnt == SW'(SAMPLE_DIV - 1)) ? '0 : scnt + 1'b1;
      bit_tick    <= (bcnt == BW'(SCLK_DIV - 1));
      bcnt        <= (bcnt == BW'(SCLK_DIV - 1)) ? '0 : bcnt + 1'b1;
    end
  end
endmodule
