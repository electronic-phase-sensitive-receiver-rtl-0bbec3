// Iterative fixed-point CORDIC, one micro rotation per clock.
//
// Micro rotation j (j = 0 .. ITER-1), sigma in {-1, +1}:
//   x' = x - sigma * (y >>> j)
//   y' = y + sigma * (x >>> j)
//   z' = z - sigma * atan(2**-j)
// Vectoring mode (CORDIC_VECTOR): sigma = -sign(y) drives y to 0, so x ends as
//   K*|(x,y)| and z gains the angle of the vector (start z at 0 for the phase).
// Rotation mode (CORDIC_ROTATE): sigma = sign(z) drives z to 0, so (x, y) is
//   rotated by the starting z; x = 1, y = 0 gives x = K*cos(z), y = K*sin(z).
// K ~ 1.64676 is the CORDIC gain; it is left in the results, as in the design,
// and the torque thresholds absorb it.
// Angles are binary angles: 2**ANG_W units per full turn, two's complement, so
// the range is [-pi, pi). Because plain CORDIC only converges within about
// +-99.7 degrees, the load cycle first turns the vector by 180 degrees when it
// lies in the left half plane (vectoring) or when |z| >= 90 degrees (rotation).
// Inputs must leave two guard bits free (|x|, |y| < 2**(W-3)): the length grows
// by up to K*sqrt(2) < 2.33.
// Timing: `start` loads the operands, ITER cycles of micro rotations follow, and
// `done` pulses with the results valid ITER+1 cycles after `start`.
// Internally z carries ZG extra fraction bits so that the rounding of the
// arctangent table does not add up over the iterations; zout is truncated back
// to AW bits. The table is computed at elaboration:
// atan(2**-j) * 2**(AW+ZG) / (2*pi), rounded.
module cordic
  import psr_pkg::*;
#(
  parameter int W      = psr_pkg::CORDIC_W,
  parameter int AW     = psr_pkg::ANG_W,
  parameter int NITER  = psr_pkg::ITER,
  parameter int ZG     = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  cordic_mode_t        mode,
  input  logic signed [W-1:0] xin,
  input  logic signed [W-1:0] yin,
  input  logic [AW-1:0]       zin,
  output logic signed [W-1:0] xout,
  output logic signed [W-1:0] yout,
  output logic [AW-1:0]       zout,
  output logic                busy,
  output logic                done
);
  localparam real PI = 3.14159265358979323846;
  localparam int  JW = $clog2(NITER + 1);
  localparam int  JI = (NITER > 1) ? $clog2(NITER) : 1;

  localparam int ZW = AW + ZG;
  typedef logic [ZW-1:0] atan_tab_t [NITER];

  function automatic atan_tab_t make_atan();
    atan_tab_t t;
    for (int j = 0; j < NITER; j++)
      t[j] = ZW'($rtoi($atan(1.0 / (2.0 ** j)) * (2.0 ** ZW) / (2.0 * PI) + 0.5));
    return t;
  endfunction

  localparam atan_tab_t ATAN = make_atan();
  localparam logic [ZW-1:0] HALF_TURN = {1'b1, {(ZW-1){1'b0}}};

  cordic_mode_t        mode_q;
  logic signed [W-1:0] x, y;
  logic [ZW-1:0]       z;
  logic [JW-1:0]       j;
  logic                sigma_pos;     // sigma = +1

  always_comb begin
    if (mode_q == CORDIC_VECTOR) sigma_pos = y[W-1];      // y < 0 -> +1
    else                         sigma_pos = !z[ZW-1];    // z >= 0 -> +1
  end

  assign xout = x;
  assign yout = y;
  assign zout = z[ZW-1 -: AW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= CORDIC_VECTOR;
      x      <= '0;
      y      <= '0;
      z      <= '0;
      j      <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        mode_q <= mode;
        j      <= '0;
        busy   <= 1'b1;
        if ((mode == CORDIC_VECTOR) ? xin[W-1] : (zin[AW-1] != zin[AW-2])) begin
          x <= -xin;
          y <= -yin;
          z <= {zin, {ZG{1'b0}}} + HALF_TURN;
        end else begin
          x <= xin;
          y <= yin;
          z <= {zin, {ZG{1'b0}}};
        end
      end else if (busy) begin
        if (sigma_pos) begin
          x <= x - (y >>> j);
          y <= y + (x >>> j);
          z <= z - ATAN[j[JI-1:0]];
        end else begin
          x <= x + (y >>> j);
          y <= y - (x >>> j);
          z <= z + ATAN[j[JI-1:0]];
        end
        j <= j + 1'b1;
        if (j == JW'(NITER - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
