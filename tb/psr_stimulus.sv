// Track circuit stand-in for the receiver testbenches: two serial A/D converter
// models fed with sampled sines at SIGNAL_HZ, one for the rail signal and one for
// the reference signal. Each conversion (falling scs) takes the sample of index
// n, counted from 0; the value for the next conversion is prepared when scs
// rises. Amplitudes are in LSB, phases
// in degrees; a few LSB of random noise are added.
module psr_stimulus #(
  parameter real FS_HZ     = 5120.0,
  parameter real SIGNAL_HZ = 75.0,
  parameter int  NOISE     = 8
) (
  input  logic sclk,
  input  logic scs,
  input  real  amp_rail,
  input  real  ph_rail_deg,
  input  real  amp_ref,
  input  real  ph_ref_deg,
  output logic sad1,
  output logic sad2,
  output int   n_samples
);
  localparam real PI = 3.14159265358979323846;
  logic signed [15:0] v1, v2;

  adc_model m_rail (.sclk, .scs, .value(v1), .sad(sad1));
  adc_model m_ref  (.sclk, .scs, .value(v2), .sad(sad2));

  function automatic logic signed [15:0] smp(input real a, input real ph, input int n);
    real v;
    v = a * $sin(2.0 * PI * SIGNAL_HZ * n / FS_HZ + ph * PI / 180.0)
        + real'($signed($urandom_range(0, 2 * NOISE)) - NOISE);
    if (v > 32767.0) v = 32767.0;
    if (v < -32768.0) v = -32768.0;
    return 16'($rtoi(v));
  endfunction

  initial begin
    n_samples = 0;
    v1 = '0;
    v2 = '0;
    #2;
    v1 = smp(amp_rail, ph_rail_deg, 0);
    v2 = smp(amp_ref, ph_ref_deg, 0);
  end

  // Conversions are counted at the falling edge of scs, which only a real
  // acquisition makes; a rising edge out of reset merely recomputes the value.
  always @(negedge scs) n_samples = n_samples + 1;

  always @(posedge scs) begin
    v1 = smp(amp_rail, ph_rail_deg, n_samples);
    v2 = smp(amp_ref, ph_ref_deg, n_samples);
  end
endmodule
