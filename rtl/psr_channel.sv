// One channel of the electronic phase sensitive receiver.
//
// Signal path, one pass per sample (all steps started by psr_sequencer):
//   adc_control     reads one rail sample (sad1) and one reference sample (sad2)
//   sample_ram x2   RAM1/RAM2 keep the last N samples of each signal
//   coef_rom, dft1  windowed one-point DFT at the track frequency, first over
//                   RAM1, then over RAM2, giving two complex vectors
//   cordic          vectoring twice: amplitude and phase of each vector;
//                   rotation once: x = 1, y = 0, z = phi_rail - phi_ref gives
//                   K*sin(phi) in y
//   torque_comp     M = A_rail * A_ref * sin(phi)
//   threshold_hyst  two thresholds with hysteresis
//   delayed_output  pull/drop time counters -> relay_out (1 = segment free)
// Scaling between the stages (choices of this implementation):
//   * CORDIC inputs are the top CORDIC_W-2 bits of the DFT accumulators, sign
//     extended by two guard bits.
//   * A_rail/A_ref are bits CORDIC_W-2 .. CORDIC_W-1-AMP_W of the CORDIC x
//     result (they include the gain K).
//   * the rotation starts at x = 2**(CORDIC_W-4), and sin is taken from bits
//     CORDIC_W-3 .. CORDIC_W-2-SIN_W of y, i.e. sin_phi = K*sin(phi)*2**(SIN_W-2).
// Timing: one computation takes about 2*(N+3) + 3*(ITER+2) + 6 clock cycles and
// must end before the next sample, CLK_HZ/FS_HZ cycles later (checked at
// elaboration). `result_valid` pulses once per sample, after the buffers have
// been filled, in the cycle in which `result` holds the new amplitudes, phases,
// torque, threshold decision, pull/drop counters and delayed output.
module psr_channel
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
  // serial A/D converters
  output logic             sclk,
  output logic             scs,
  input  logic             sad1,       // rail signal
  input  logic             sad2,       // reference signal
  // settings
  input  torque_t          thr_high,
  input  torque_t          thr_low,
  input  logic [CNT_W-1:0] pull_cnt,
  input  logic [CNT_W-1:0] drop_cnt,
  // results
  output logic             relay_out,
  output chan_result_t     result,
  output logic             result_valid,
  output logic             filled,
  output logic             overrun
);
  localparam int AW     = $clog2(N);
  localparam int BIN    = SIGNAL_HZ * N / FS_HZ;
  localparam int ACC_W  = SAMPLE_W + COEF_W + AW;
  localparam int BUDGET = 2 * (N + 3) + 3 * (ITER + 2) + 8;
  localparam cdata_t X_ONE = cdata_t'(1) <<< (CORDIC_W - 4);

  initial begin
    assert (SIGNAL_HZ * N % FS_HZ == 0 && 2 * BIN < N)
      else $error("psr_channel: the signal frequency must fall on a DFT bin");
    assert (CLK_HZ / FS_HZ > BUDGET)
      else $error("psr_channel: too few clock cycles per sample");
    assert (N == (1 << AW)) else $error("psr_channel: N must be a power of two");
    assert (ACC_W >= CORDIC_W) else $error("psr_channel: N too small");
  end

  // ---------------------------------------------------------------- timing
  logic sample_tick, bit_tick;
  clock_gen #(.CLK_HZ(CLK_HZ), .FS_HZ(FS_HZ), .SCLK_DIV(SCLK_DIV)) u_clk (
    .clk, .rst_n, .sample_tick, .bit_tick
  );

  // ---------------------------------------------------------- acquisition
  logic signed [SAMPLE_W-1:0] sample1, sample2;
  logic adc_valid, adc_overrun;
  adc_control #(.CONV_TICKS(CONV_TICKS)) u_adc (
    .clk, .rst_n, .sample_tick, .bit_tick, .sclk, .scs, .sad1, .sad2,
    .sample1, .sample2, .valid(adc_valid), .overrun(adc_overrun)
  );

  // ------------------------------------------------------------ sequencer
  seq_state_t   state;
  logic         ram_we, dft_start, cordic_start, torque_start, result_en;
  logic         seq_overrun, dft_done, cordic_done, torque_done;
  logic [AW-1:0] wptr;
  cordic_mode_t cordic_mode;

  psr_sequencer #(.N(N)) u_seq (
    .clk, .rst_n, .adc_valid, .dft_done, .cordic_done, .torque_done,
    .state, .ram_we, .wptr, .dft_start, .cordic_start, .cordic_mode,
    .torque_start, .result_en, .filled, .overrun(seq_overrun)
  );

  // ------------------------------------------------------ buffers and ROM
  logic [AW-1:0] dft_idx, raddr;
  logic [SAMPLE_W-1:0] rd1, rd2;
  logic signed [COEF_W-1:0] cos_q, sin_q;

  assign raddr = wptr + dft_idx;           // oldest sample first

  sample_ram #(.DEPTH(N), .W(SAMPLE_W)) u_ram1 (
    .clk, .we(ram_we), .waddr(wptr), .wdata(sample1), .raddr, .rdata(rd1)
  );
  sample_ram #(.DEPTH(N), .W(SAMPLE_W)) u_ram2 (
    .clk, .we(ram_we), .waddr(wptr), .wdata(sample2), .raddr, .rdata(rd2)
  );
  coef_rom #(.N(N), .BIN(BIN), .COEF_W(COEF_W)) u_rom (
    .clk, .addr(dft_idx), .cos_q, .sin_q
  );

  // ------------------------------------------------------------------ DFT
  logic signed [ACC_W-1:0] dft_re, dft_im;
  logic dft_busy;
  dft1 #(.N(N), .SAMPLE_W(SAMPLE_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_dft (
    .clk, .rst_n, .start(dft_start), .idx(dft_idx), .busy(dft_busy),
    .x((state == S_DFT_REF) ? $signed(rd2) : $signed(rd1)),
    .c(cos_q), .s(sin_q), .re(dft_re), .im(dft_im), .done(dft_done)
  );

  cdata_t re_rail, im_rail, re_ref, im_ref;

  function automatic cdata_t to_cordic(input logic signed [ACC_W-1:0] v);
    return cdata_t'($signed(v[ACC_W-1 -: CORDIC_W-2]));
  endfunction

  // --------------------------------------------------------------- CORDIC
  cdata_t c_xin, c_yin, c_xout, c_yout;
  angle_t c_zin, c_zout;
  logic   c_busy;
  logic [AMP_W-1:0] amp_rail, amp_ref;
  angle_t           ph_rail, ph_ref;
  logic signed [SIN_W-1:0] sin_phi;

  always_comb begin
    c_xin = X_ONE;
    c_yin = '0;
    c_zin = ph_rail - ph_ref;
    if (state == S_VEC_RAIL) begin
      c_xin = re_rail; c_yin = im_rail; c_zin = '0;
    end else if (state == S_VEC_REF) begin
      c_xin = re_ref;  c_yin = im_ref;  c_zin = '0;
    end
  end

  cordic u_cordic (
    .clk, .rst_n, .start(cordic_start), .mode(cordic_mode),
    .xin(c_xin), .yin(c_yin), .zin(c_zin),
    .xout(c_xout), .yout(c_yout), .zout(c_zout), .busy(c_busy), .done(cordic_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      re_rail <= '0; im_rail <= '0; re_ref <= '0; im_ref <= '0;
      amp_rail <= '0; amp_ref <= '0; ph_rail <= '0; ph_ref <= '0;
      sin_phi <= '0;
    end else begin
      if (dft_done && state == S_DFT_RAIL) begin
        re_rail <= to_cordic(dft_re);
        im_rail <= to_cordic(dft_im);
      end
      if (dft_done && state == S_DFT_REF) begin
        re_ref <= to_cordic(dft_re);
        im_ref <= to_cordic(dft_im);
      end
      if (cordic_done && state == S_VEC_RAIL) begin
        amp_rail <= c_xout[CORDIC_W-2 -: AMP_W];
        ph_rail  <= c_zout;
      end
      if (cordic_done && state == S_VEC_REF) begin
        amp_ref <= c_xout[CORDIC_W-2 -: AMP_W];
        ph_ref  <= c_zout;
      end
      if (cordic_done && state == S_ROT)
        sin_phi <= c_yout[CORDIC_W-3 -: SIN_W];
    end
  end

  // ----------------------------------------------- torque, threshold, delay
  torque_t torque;
  logic    thr_out, result_en_q;
  logic [CNT_W-1:0] true_cnt, false_cnt;

  torque_comp u_torque (
    .clk, .rst_n, .start(torque_start), .amp1(amp_rail), .amp2(amp_ref),
    .sin_phi, .m(torque), .done(torque_done)
  );

  threshold_hyst u_thr (
    .clk, .rst_n, .en(result_en), .torque, .thr_high, .thr_low, .out(thr_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result_en_q  <= 1'b0;
      result_valid <= 1'b0;
    end else begin
      result_en_q  <= result_en;
      result_valid <= result_en_q;
    end
  end

  delayed_output u_delay (
    .clk, .rst_n, .en(result_en_q), .din(thr_out), .pull_cnt, .drop_cnt,
    .out(relay_out), .true_cnt, .false_cnt
  );

  assign overrun = adc_overrun | seq_overrun;

  always_comb begin
    result.amp_rail  = amp_rail;
    result.amp_ref   = amp_ref;
    result.ph_rail   = ph_rail;
    result.ph_ref    = ph_ref;
    result.torque    = torque;
    result.thr_out   = thr_out;
    result.relay_out = relay_out;
    result.true_cnt  = true_cnt;
    result.false_cnt = false_cnt;
    result.state     = state;
  end

  // A new pair of samples may only arrive while the sequencer is idle.
  always_ff @(posedge clk) begin
    if (rst_n && adc_valid)
      a_no_overrun: assert (state == S_IDLE)
        else $error("psr_channel: sample arrived during a computation");
  end
endmodule
