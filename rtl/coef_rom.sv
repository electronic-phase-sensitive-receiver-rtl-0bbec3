// Coefficient ROM of the one-point DFT: windowed cos and sin of one frequency bin.
//
// For address i (0 <= i < N) it returns, one cycle later,
//   cos_q = round(A * w(i) * cos(2*pi*BIN*i/N))
//   sin_q = round(A * w(i) * sin(2*pi*BIN*i/N)),   A = 2**(COEF_W-1) - 1,
// where w is the Kaiser window with beta = 2,
//   w(i) = I0(beta * sqrt(1 - (2*i/(N-1) - 1)**2)) / I0(beta),
// and I0 is the modified Bessel function of order zero (power series). The window
// lowers the leakage caused by the finite buffer. BIN = SIGNAL_HZ * N / FS_HZ is
// the bin of the track signal: 15 for 75 Hz and 55 for 275 Hz at 5 Hz per bin.
// The Kaiser window and beta = 2 are the design's; the coefficient width and the
// symmetric form of the window are this implementation's choices. The table is
// computed when the design is elaborated.
module coef_rom #(
  parameter int N         = 1024,
  parameter int BIN       = 15,
  parameter int COEF_W    = psr_pkg::COEF_W
) (
  input  logic                     clk,
  input  logic [$clog2(N)-1:0]     addr,
  output logic signed [COEF_W-1:0] cos_q,
  output logic signed [COEF_W-1:0] sin_q
);
  localparam real PI   = 3.14159265358979323846;
  localparam real BETA = 2.0;

  typedef logic signed [COEF_W-1:0] tab_t [N];

  function automatic real bessel_i0(input real x);
    real sum, term;
    sum  = 1.0;
    term = 1.0;
    for (int k = 1; k < 30; k++) begin
      term = term * (x / (2.0 * k)) * (x / (2.0 * k));
      sum  = sum + term;
    end
    return sum;
  endfunction

  function automatic real kaiser(input int i);
    real r;
    r = 2.0 * i / (N - 1) - 1.0;
    return bessel_i0(BETA * $sqrt(1.0 - r * r)) / bessel_i0(BETA);
  endfunction

  function automatic int round_coef(input real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  function automatic tab_t make_table(input bit use_sin);
    tab_t t;
    real  amp, ph;
    amp = real'((1 << (COEF_W - 1)) - 1);
    for (int i = 0; i < N; i++) begin
      ph = 2.0 * PI * BIN * i / N;
      t[i] = COEF_W'(round_coef(amp * kaiser(i) * (use_sin ? $sin(ph) : $cos(ph))));
    end
    return t;
  endfunction

  localparam tab_t COS_TAB = make_table(1'b0);
  localparam tab_t SIN_TAB = make_table(1'b1);

  always_ff @(posedge clk) begin
    cos_q <= COS_TAB[addr];
    sin_q <= SIN_TAB[addr];
  end
endmodule
