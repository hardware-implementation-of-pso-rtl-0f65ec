// Particle swarm controller: searches the gray level of highest fitness and
// returns it as the segmentation threshold.
//
// It holds the state of NPART particles (position, velocity, personal best
// and its fitness) in a particle memory and runs the swarm flow:
//   INIT   - the initialisation block writes random positions and velocities
//            and zero personal bests; the global best is cleared;
//   EVAL   - for each particle the fitness at its position is read from the
//            histogram, its personal best is updated if the new fitness is
//            better, and the global best is updated from that personal best;
//            after the last particle gbest is the best of all personal bests;
//   UPDATE - for each particle velocity and position are advanced with the
//            update equations, drawing two fresh random fractions r1, r2
//            from a second LFSR (16 bits per clock, low and high byte);
//   EVAL and UPDATE repeat NITER times, then the integer part of gbest is
//   presented as threshold and done pulses.
//
// The flow, the particle count (80), the iteration count (100) and w = c1 =
// c2 = 0.5 follow the original architecture.  One particle per clock in each phase, the
// sequential schedule and the seeds are this implementation's choices.
//
// Timing: start is taken in IDLE.  done pulses NPART + 2 + NITER * 2 * NPART
// clocks after the start clock.  fit_level/fit is a combinational read of the
// histogram, used one particle per clock during EVAL.  threshold holds its
// value until the next start.
module pso_core
  import pso_pkg::*;
#(
  parameter int unsigned NPART     = 80,
  parameter int unsigned NITER     = 100,
  parameter coef_t       W         = COEF_HALF,
  parameter coef_t       C1        = COEF_HALF,
  parameter coef_t       C2        = COEF_HALF,
  parameter int unsigned XMIN      = 0,
  parameter int unsigned XMAX      = 255,
  parameter int unsigned VMAX      = 32,
  parameter logic [15:0] INIT_SEED = 16'h1D2B,
  parameter logic [15:0] UPD_SEED  = 16'h7A35,
  localparam int unsigned IW = (NPART > 1) ? $clog2(NPART) : 1,
  localparam int unsigned TW = (NITER > 1) ? $clog2(NITER) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output gray_t         threshold,
  output fit_t          best_fit,     // fitness at the threshold
  // histogram fitness look-up
  output gray_t         fit_level,
  input  fit_t          fit,
  // event strobes, one clock each
  output logic          pbest_evt,    // a personal best improved
  output logic          gbest_evt,    // the global best improved
  output logic          iter_evt      // an iteration completed
);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_EVAL, S_UPDATE, S_DONE} state_e;
  state_e state;

  particle_t     parts [NPART];
  logic [IW-1:0] k;
  logic [TW-1:0] iter;
  fix_t          gbest;
  fit_t          gfit;

  // Initialisation block
  logic          init_start, init_done, init_busy, init_we;
  logic [IW-1:0] init_idx;
  particle_t     init_p;

  assign init_start = (state == S_IDLE) && start;

  pso_init #(
    .NPART(NPART), .XMIN(XMIN), .XMAX(XMAX), .VMAX(VMAX), .SEED(INIT_SEED)
  ) u_init (
    .clk(clk), .rst_n(rst_n), .start(init_start), .busy(init_busy), .done(init_done),
    .wr_en(init_we), .wr_idx(init_idx), .wr_particle(init_p)
  );

  // Random numbers for the velocity update
  logic [15:0] urnd;
  lfsr #(.WIDTH(16), .TAPS(16'hD008), .SEED(UPD_SEED), .STEPS(16)) u_rng (
    .clk(clk), .rst_n(rst_n), .load(1'b0), .en(state == S_UPDATE), .q(urnd), .out()
  );

  // Current particle
  particle_t cur;
  assign cur       = parts[k];
  assign fit_level = pos_level(cur.x);

  // pbest / gbest comparators
  fix_t pb_n, gb_n;
  fit_t pf_n, gf_n;
  logic pb_upd, gb_upd;
  pso_best u_best (
    .x(cur.x), .fit(fit), .pbest(cur.pbest), .pfit(cur.pfit),
    .gbest(gbest), .gfit(gfit),
    .pbest_o(pb_n), .pfit_o(pf_n), .gbest_o(gb_n), .gfit_o(gf_n),
    .pbest_upd(pb_upd), .gbest_upd(gb_upd)
  );

  // Velocity and position update
  fix_t x_n, v_n;
  pso_update #(
    .W(W), .C1(C1), .C2(C2), .XMIN(XMIN), .XMAX(XMAX), .VMAX(VMAX)
  ) u_upd (
    .x(cur.x), .v(cur.v), .pbest(cur.pbest), .gbest(gbest),
    .r1(urnd[7:0]), .r2(urnd[15:8]), .x_o(x_n), .v_o(v_n)
  );

  // Particle memory
  always_ff @(posedge clk) begin
    if (init_we) begin
      parts[init_idx] <= init_p;
    end else if (state == S_EVAL) begin
      parts[k].pbest <= pb_n;
      parts[k].pfit  <= pf_n;
    end else if (state == S_UPDATE) begin
      parts[k].x <= x_n;
      parts[k].v <= v_n;
    end
  end

  logic last_k;
  assign last_k = (k == IW'(NPART - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      k         <= '0;
      iter      <= '0;
      gbest     <= '0;
      gfit      <= '0;
      done      <= 1'b0;
      threshold <= '0;
      best_fit  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_INIT;
          gbest <= '0;
          gfit  <= '0;
          k     <= '0;
          iter  <= '0;
        end
        S_INIT: if (init_done) state <= S_EVAL;
        S_EVAL: begin
          gbest <= gb_n;
          gfit  <= gf_n;
          k     <= last_k ? '0 : k + 1'b1;
          if (last_k) state <= S_UPDATE;
        end
        S_UPDATE: begin
          k <= last_k ? '0 : k + 1'b1;
          if (last_k) begin
            iter <= iter + 1'b1;
            state <= (iter == TW'(NITER - 1)) ? S_DONE : S_EVAL;
          end
        end
        S_DONE: begin
          threshold <= pos_level(gbest);
          best_fit  <= gfit;
          done      <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign pbest_evt = (state == S_EVAL) && pb_upd;
  assign gbest_evt = (state == S_EVAL) && gb_upd;
  assign iter_evt  = (state == S_UPDATE) && last_k;

endmodule
