// Shared types and number formats of the PSO image-segmentation datapath.
//
// Gray levels are 8-bit unsigned, so a particle's position is a candidate
// threshold in 0..255.  Positions and velocities are signed fixed point with
// POS_FRAC fraction bits (Q10.8 in 18 bits); the integer part of a position
// is the gray level at which its fitness is read.  The PSO coefficients w,
// c1 and c2 are unsigned Q2.8 and the random numbers are unsigned Q0.8
// fractions in [0, 1).  Fixed point everywhere follows the original architecture's
// stated choice of fixed-point arithmetic; the exact formats are this
// implementation's choice.
package pso_pkg;

  localparam int unsigned PIX_W    = 8;               // gray level width
  localparam int unsigned LEVELS   = 1 << PIX_W;      // number of gray levels
  localparam int unsigned POS_FRAC = 8;               // fraction bits of positions
  localparam int unsigned POS_W    = 18;              // signed Q10.8
  localparam int unsigned COEF_W   = 10;              // unsigned Q2.8 coefficients
  localparam int unsigned RAND_W   = 8;               // unsigned Q0.8 random numbers
  localparam int unsigned FIT_W    = 20;              // histogram count width

  typedef logic        [PIX_W-1:0]  gray_t;
  typedef logic signed [POS_W-1:0]  fix_t;
  typedef logic        [COEF_W-1:0] coef_t;
  typedef logic        [RAND_W-1:0] rand_t;
  typedef logic        [FIT_W-1:0]  fit_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // One particle's state as stored by the swarm controller.
  typedef struct packed {
    fix_t x;       // position (candidate threshold)
    fix_t v;       // velocity
    fix_t pbest;   // best position found by this particle
    fit_t pfit;    // fitness at pbest
  } particle_t;

  // Coefficient 0.5 in Q2.8, the value used for w, c1 and c2.
  localparam coef_t COEF_HALF = coef_t'(128);

  // Gray level read by a position: integer part, saturated to 0..LEVELS-1.
  function automatic gray_t pos_level(fix_t x);
    if (x < 0) return '0;
    if ((x >>> POS_FRAC) > fix_t'(LEVELS - 1)) return gray_t'(LEVELS - 1);
    return gray_t'(x >>> POS_FRAC);
  endfunction

endpackage
