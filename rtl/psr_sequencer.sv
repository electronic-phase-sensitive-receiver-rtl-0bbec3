// Sequencer: the state machines that run one channel's computation per sample.
//
// For every new pair of samples (`adc_valid` from the A/D control) it steps:
//   S_WRITE    write both samples at `wptr` into RAM1/RAM2, advance wptr
//   S_DFT_RAIL one-point DFT over RAM1        (dft_start, wait dft_done)
//   S_DFT_REF  one-point DFT over RAM2        (dft_start, wait dft_done)
//   S_VEC_RAIL CORDIC vectoring, rail vector  (cordic_start, wait cordic_done)
//   S_VEC_REF  CORDIC vectoring, ref vector
//   S_ROT      CORDIC rotation by the phase difference
//   S_TORQUE   two multiplications            (torque_start, wait torque_done)
//   S_OUTPUT   result_en: threshold logic and pull/drop counters take the torque
// and returns to S_IDLE. Until the buffers have been filled once (N samples) it
// only writes samples, so nothing is computed over uninitialised RAM; `filled`
// tells when results start. The start strobes are registered and high in the
// first cycle of their state; the datapath selects its operands by `state`.
// After the write, `wptr` points at the oldest sample, which is where the DFT
// starts reading. A sample that arrives while a computation is still running is
// an overrun: it is dropped and `overrun` is set until reset.
// The order of steps follows the design's description; the encoding and the
// handshake (start strobe / done pulse) are this implementation's choices.
module psr_sequencer
  import psr_pkg::*;
#(
  parameter int N = 1024
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 adc_valid,
  input  logic                 dft_done,
  input  logic                 cordic_done,
  input  logic                 torque_done,
  output seq_state_t           state,
  output logic                 ram_we,
  output logic [$clog2(N)-1:0] wptr,
  output logic                 dft_start,
  output logic                 cordic_start,
  output cordic_mode_t         cordic_mode,
  output logic                 torque_start,
  output logic                 result_en,
  output logic                 filled,
  output logic                 overrun
);
  localparam int AW = $clog2(N);

  logic [AW-1:0] fill_cnt;

  assign ram_we      = (state == S_WRITE);
  assign result_en   = (state == S_OUTPUT);
  assign cordic_mode = (state == S_ROT) ? CORDIC_ROTATE : CORDIC_VECTOR;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      wptr         <= '0;
      fill_cnt     <= '0;
      filled       <= 1'b0;
      overrun      <= 1'b0;
      dft_start    <= 1'b0;
      cordic_start <= 1'b0;
      torque_start <= 1'b0;
    end else begin
      dft_start    <= 1'b0;
      cordic_start <= 1'b0;
      torque_start <= 1'b0;
      if (adc_valid && state != S_IDLE) overrun <= 1'b1;
      unique case (state)
        S_IDLE: if (adc_valid) state <= S_WRITE;
        S_WRITE: begin
          wptr <= wptr + 1'b1;
          if (filled || fill_cnt == AW'(N - 1)) begin
            filled    <= 1'b1;
            dft_start <= 1'b1;
            state     <= S_DFT_RAIL;
          end else begin
            fill_cnt <= fill_cnt + 1'b1;
            state    <= S_IDLE;
          end
        end
        S_DFT_RAIL: if (dft_done) begin
          dft_start <= 1'b1;
          state     <= S_DFT_REF;
        end
        S_DFT_REF: if (dft_done) begin
          cordic_start <= 1'b1;
          state        <= S_VEC_RAIL;
        end
        S_VEC_RAIL: if (cordic_done) begin
          cordic_start <= 1'b1;
          state        <= S_VEC_REF;
        end
        S_VEC_REF: if (cordic_done) begin
          cordic_start <= 1'b1;
          state        <= S_ROT;
        end
        S_ROT: if (cordic_done) begin
          torque_start <= 1'b1;
          state        <= S_TORQUE;
        end
        S_TORQUE: if (torque_done) state <= S_OUTPUT;
        S_OUTPUT: state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end
endmodule
