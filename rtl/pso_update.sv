// Update block of the particle swarm: new velocity and position of one
// particle.
//
//   v' = w v + c1 r1 (pbest - x) + c2 r2 (gbest - x)
//   x' = x + v'
//
// built from two subtracters (pbest - x, gbest - x), three multipliers by
// the constants w, c1, c2, two multipliers by the random fractions r1, r2,
// and the adders that sum the three terms and add the velocity to the
// position.  All values are fixed point: x, v, pbest, gbest in Q10.8, w, c1,
// c2 in Q2.8 (0.5 = 128), r1, r2 in Q0.8; products are truncated toward
// minus infinity (arithmetic right shift).  The new velocity is saturated to
// +/-VMAX gray levels and the new position to XMIN..XMAX, which keeps the
// position a valid gray level.
//
// The equations and the coefficient values 0.5 follow the original architecture.  The
// number formats, truncation and both saturations are this implementation's
// choices.
//
// Purely combinational.
module pso_update
  import pso_pkg::*;
#(
  parameter coef_t       W    = COEF_HALF,
  parameter coef_t       C1   = COEF_HALF,
  parameter coef_t       C2   = COEF_HALF,
  parameter int unsigned XMIN = 0,
  parameter int unsigned XMAX = 255,
  parameter int unsigned VMAX = 32
) (
  input  fix_t  x,
  input  fix_t  v,
  input  fix_t  pbest,
  input  fix_t  gbest,
  input  rand_t r1,
  input  rand_t r2,
  output fix_t  x_o,
  output fix_t  v_o
);

  localparam int PW = 48;
  typedef logic signed [PW-1:0] wide_t;

  localparam wide_t VLIM = wide_t'(VMAX) <<< POS_FRAC;
  localparam wide_t XLO  = wide_t'(XMIN) <<< POS_FRAC;
  localparam wide_t XHI  = wide_t'(XMAX) <<< POS_FRAC;

  wide_t dp, dg, tw, t1, t2, vs, xs;

  always_comb begin
    dp = wide_t'(pbest) - wide_t'(x);
    dg = wide_t'(gbest) - wide_t'(x);
    tw = (wide_t'(v) * wide_t'({1'b0, W})) >>> POS_FRAC;
    t1 = (dp * wide_t'({1'b0, C1}) * wide_t'({1'b0, r1})) >>> (2 * POS_FRAC);
    t2 = (dg * wide_t'({1'b0, C2}) * wide_t'({1'b0, r2})) >>> (2 * POS_FRAC);
    vs = tw + t1 + t2;
    if (vs > VLIM)       vs = VLIM;
    else if (vs < -VLIM) vs = -VLIM;
    xs = wide_t'(x) + vs;
    if (xs > XHI)      xs = XHI;
    else if (xs < XLO) xs = XLO;
    v_o = fix_t'(vs);
    x_o = fix_t'(xs);
  end

endmodule
