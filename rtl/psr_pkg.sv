// Shared widths, types and constants of the phase sensitive receiver.
//
// The receiver replaces an electro-mechanical phase sensitive track relay. Each
// channel digitises the rail signal and the reference signal, takes one DFT bin of
// each, turns both into amplitude and phase with a CORDIC, forms the relay torque
// M = I1 * I2 * sin(phi1 - phi2), thresholds it with hysteresis and delays the
// result by programmable pull and drop times.
//
// The 16-bit sample width follows the 16-bit converters of the design. All other
// widths here are this implementation's choices:
//   * CORDIC_W  : CORDIC datapath width (DFT result plus two guard bits for the
//                 CORDIC gain K = 1.647 and the sqrt(2) of the vector length).
//   * ANG_W     : phase as a binary angle, 2**ANG_W units per full turn, so phase
//                 arithmetic wraps naturally.
//   * AMP_W/SIN_W: operand widths of the torque multipliers (18x18 hard
//                 multipliers of an FPGA fit them).
package psr_pkg;

  localparam int SAMPLE_W  = 16;            // A/D converter resolution
  localparam int COEF_W    = 16;            // DFT coefficient width (signed)
  localparam int CORDIC_W  = 24;            // CORDIC x/y width (signed)
  localparam int ANG_W     = 16;            // binary angle width
  localparam int ITER      = 16;            // CORDIC micro rotations
  localparam int AMP_W     = 16;            // amplitude operand of the torque
  localparam int SIN_W     = 16;            // sin(phi) operand of the torque
  localparam int M_W       = 2*AMP_W + SIN_W; // torque width (signed)
  localparam int CNT_W     = 16;            // pull / drop counter width

  typedef logic signed [CORDIC_W-1:0] cdata_t;
  typedef logic        [ANG_W-1:0]    angle_t;
  typedef logic signed [M_W-1:0]      torque_t;

  typedef enum logic {
    CORDIC_VECTOR = 1'b0,   // (x, y) -> (K*|v|, 0), z += angle(v)
    CORDIC_ROTATE = 1'b1    // (x, y) rotated by z, z -> 0
  } cordic_mode_t;

  // Steps of the per-sample computation, run by psr_sequencer.
  typedef enum logic [3:0] {
    S_IDLE     = 4'd0,  // wait for a new pair of samples
    S_WRITE    = 4'd1,  // write the samples to RAM1 / RAM2
    S_DFT_RAIL = 4'd2,  // one-point DFT over RAM1 (rail)
    S_DFT_REF  = 4'd3,  // one-point DFT over RAM2 (reference)
    S_VEC_RAIL = 4'd4,  // CORDIC vectoring of the rail vector
    S_VEC_REF  = 4'd5,  // CORDIC vectoring of the reference vector
    S_ROT      = 4'd6,  // CORDIC rotation: sin of the phase difference
    S_TORQUE   = 4'd7,  // two multiplications
    S_OUTPUT   = 4'd8   // threshold and pull/drop counters take the result
  } seq_state_t;

  // Everything one channel offers to the reciprocal comparison.
  typedef struct packed {
    logic [AMP_W-1:0] amp_rail;
    logic [AMP_W-1:0] amp_ref;
    angle_t           ph_rail;
    angle_t           ph_ref;
    torque_t          torque;
    logic             thr_out;     // threshold logic output
    logic             relay_out;   // delayed output, 1 = segment free
    logic [CNT_W-1:0] true_cnt;    // pull/drop counters
    logic [CNT_W-1:0] false_cnt;
    seq_state_t       state;       // sequencer state
  } chan_result_t;

endpackage
