// Expected values for the receiver testbenches, computed from the signal
// parameters with real arithmetic, independently of the RTL.
//
// For x_n = A*sin(theta*n + phi) and coefficients C*w_n*cos/sin(theta*n), the
// DFT bin is X = A*C*sum(w)/2 * e^(j*(phi - 90 deg)) (the image term is
// neglected). The channel scales X by 2**-(ACC_W-(CORDIC_W-2)) into the CORDIC,
// which multiplies by K, and keeps AMP_W bits starting at bit CORDIC_W-2, so
// amp = K*|X| / 2**(ACC_W - CORDIC_W + 2 + CORDIC_W - 1 - AMP_W). The torque is
// amp_rail * amp_ref * K * sin(phi_rail - phi_ref) * 2**(SIN_W-2).
package psr_tb_pkg;
  localparam real PI = 3.14159265358979323846;
  localparam real K  = 1.6467602581;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // I0 by numerical integration: (1/pi) * integral_0^pi exp(x cos t) dt
  function automatic real i0(input real x);
    real s;
    s = 0.0;
    for (int k = 0; k < 400; k++) s += $exp(x * $cos(PI * (k + 0.5) / 400.0));
    return s / 400.0;
  endfunction

  function automatic real window_sum(input int n);
    real s, r, ib;
    ib = i0(2.0);
    s = 0.0;
    for (int i = 0; i < n; i++) begin
      r = 2.0 * i / (n - 1) - 1.0;
      s += i0(2.0 * $sqrt(1.0 - r * r)) / ib;
    end
    return s;
  endfunction

  // amplitude as the channel reports it, for a sine of amplitude a (LSB)
  function automatic real exp_amp(input real a, input int n, input real wsum);
    int acc_w;
    acc_w = 32 + $clog2(n);
    return K * a * 32767.0 * wsum / 2.0 / (2.0 ** (acc_w - 15));
  endfunction

  function automatic real exp_torque(input real amp_rail, input real amp_ref, input real phi_deg);
    return amp_rail * amp_ref * K * $sin(phi_deg * PI / 180.0) * 16384.0;
  endfunction

  // binary angle (16 bit) to degrees in [-180, 180)
  function automatic real ang_deg(input logic [15:0] a);
    return real'($signed(a)) * 360.0 / 65536.0;
  endfunction
endpackage
