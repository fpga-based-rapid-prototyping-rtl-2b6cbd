// cranc_pkg: constants and types shared by the decorrelator RTL.
//
// The default number format is a 24-bit two's-complement word with 4 integer
// bits (sign included) and 20 fraction bits, the format the decorrelator was
// built in. The LMS step size is a power of two, mu = 2^-7, so the weight
// update uses an arithmetic shift instead of a multiplier. The AGC loop filter
// pole is alpha = 2^-1. The stage controller states are listed here so that
// testbenches can name them.
package cranc_pkg;

  // Default fixed-point format: Q4.20 in 24 bits.
  localparam int unsigned DATA_W_DEF   = 24;
  localparam int unsigned FRAC_W_DEF   = 20;

  // LMS step size mu = 2^-MU_SHIFT.
  localparam int unsigned MU_SHIFT_DEF = 7;

  // AGC leaky-integrator pole alpha = 2^-ALPHA_SHIFT.
  localparam int unsigned ALPHA_SHIFT_DEF = 1;

  // Weights per stage in the two-stage cascade: register stage, then RAM stage.
  localparam int unsigned TAPS_STAGE1_DEF = 50;
  localparam int unsigned TAPS_STAGE2_DEF = 42;

  // Controller of one cross-coupled LMS stage.
  typedef enum logic [2:0] {
    ST_CLR  = 3'd0,  // zero weights and delay lines, one address per cycle
    ST_IDLE = 3'd1,  // wait for a sample
    ST_DOT  = 3'd2,  // both filter outputs X^T w, two half-length MACs each
    ST_ERR  = 3'd3,  // e = s - X^T w, saturated
    ST_UPD  = 3'd4,  // w += mu * e * X, both halves in parallel
    ST_SH0  = 3'd5,  // delay line shift: read the oldest entry of the first half
    ST_SH1  = 3'd6   // delay line shift: move it to the second half, insert new error
  } stage_state_t;

endpackage
