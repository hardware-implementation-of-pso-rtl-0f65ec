// Best-position tracking of the swarm: the personal-best (pbest) and
// global-best (gbest) comparators.
//
// For one particle it compares the fitness of the particle's current
// position with the fitness of its personal best and, if the new one is
// better, takes the current position as the new personal best.  The
// resulting personal best is then compared with the swarm's global best in
// the same way.  Applied to every particle in turn this leaves gbest equal
// to the best of all personal bests, as the swarm flow requires.  The
// integer part of gbest is the segmentation threshold.
//
// "Better" means a strictly larger fitness (a larger histogram count); a tie
// keeps the stored best.  The original says only "better"; the direction and
// tie rule are this implementation's choice.
//
// Purely combinational.
module pso_best
  import pso_pkg::*;
(
  input  fix_t  x,          // current position
  input  fit_t  fit,        // fitness at x
  input  fix_t  pbest,
  input  fit_t  pfit,
  input  fix_t  gbest,
  input  fit_t  gfit,
  output fix_t  pbest_o,
  output fit_t  pfit_o,
  output fix_t  gbest_o,
  output fit_t  gfit_o,
  output logic  pbest_upd,
  output logic  gbest_upd
);

  always_comb begin
    pbest_upd = (fit > pfit);
    pbest_o   = pbest_upd ? x   : pbest;
    pfit_o    = pbest_upd ? fit : pfit;
    gbest_upd = (pfit_o > gfit);
    gbest_o   = gbest_upd ? pbest_o : gbest;
    gfit_o    = gbest_upd ? pfit_o  : gfit;
  end

endmodule
