// A/D converter control: reads both 16-bit serial SAR converters at once.
//
// The rail and the reference converter share the chip select `scs` (active low)
// and the serial clock `sclk`; each has its own data line (sad1 rail, sad2
// reference). One acquisition, started by `sample_tick`:
//   1. scs falls; the converters sample their input and convert. The controller
//      waits CONV_TICKS bit_ticks for the conversion.
//   2. 16 sclk periods, MSB first. Converters change their data after a falling
//      sclk edge; the controller takes a bit when it raises sclk.
//   3. scs rises and both samples appear on sample1/sample2 with a one-cycle
//      `valid` pulse. Samples are two's complement.
// sad1/sad2 pass a two-flop synchroniser (they come through optocouplers), so
// SCLK_DIV must be at least 3 for a bit to settle before it is taken.
// The serial protocol details (sclk idle low, conversion wait, sample coding)
// are this implementation's choices; the design only names a serial 16-bit SAR
// converter with sclk, scs and two data lines. A sample_tick that arrives while
// an acquisition is running is ignored and reported on `overrun`.
module adc_control #(
  parameter int SAMPLE_W   = psr_pkg::SAMPLE_W,
  parameter int CONV_TICKS = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       sample_tick,
  input  logic                       bit_tick,
  output logic                       sclk,
  output logic                       scs,
  input  logic                       sad1,
  input  logic                       sad2,
  output logic signed [SAMPLE_W-1:0] sample1,
  output logic signed [SAMPLE_W-1:0] sample2,
  output logic                       valid,
  output logic                       overrun
);
  typedef enum logic [1:0] {A_IDLE, A_CONV, A_SHIFT} adc_state_t;
  localparam int CW = $clog2(CONV_TICKS + 1);
  localparam int NW = $clog2(SAMPLE_W + 1);

  adc_state_t          st;
  logic [CW-1:0]       conv_cnt;
  logic [NW-1:0]       bit_cnt;
  logic [SAMPLE_W-1:0] sh1, sh2;
  logic [1:0]          sync1, sync2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0;
      sync2 <= '0;
    end else begin
      sync1 <= {sync1[0], sad1};
      sync2 <= {sync2[0], sad2};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= A_IDLE;
      conv_cnt <= '0;
      bit_cnt  <= '0;
      sh1      <= '0;
      sh2      <= '0;
      sclk     <= 1'b0;
      scs      <= 1'b1;
      sample1  <= '0;
      sample2  <= '0;
      valid    <= 1'b0;
      overrun  <= 1'b0;
    end else begin
      valid   <= 1'b0;
      overrun <= sample_tick && (st != A_IDLE);
      unique case (st)
        A_IDLE: if (sample_tick) begin
          scs      <= 1'b0;
          conv_cnt <= CW'(CONV_TICKS);
          st       <= A_CONV;
        end
        A_CONV: if (bit_tick) begin
          if (conv_cnt == '0) begin
            bit_cnt <= '0;
            st      <= A_SHIFT;
          end else begin
            conv_cnt <= conv_cnt - 1'b1;
          end
        end
        A_SHIFT: if (bit_tick) begin
          if (!sclk) begin
            sclk <= 1'b1;
            sh1  <= {sh1[SAMPLE_W-2:0], sync1[1]};
            sh2  <= {sh2[SAMPLE_W-2:0], sync2[1]};
          end else begin
            sclk    <= 1'b0;
            bit_cnt <= bit_cnt + 1'b1;
            if (bit_cnt == NW'(SAMPLE_W - 1)) begin
              scs     <= 1'b1;
              sample1 <= sh1;
              sample2 <= sh2;
              valid   <= 1'b1;
              st      <= A_IDLE;
            end
          end
        end
        default: st <= A_IDLE;
      endcase
    end
  end
endmodule
