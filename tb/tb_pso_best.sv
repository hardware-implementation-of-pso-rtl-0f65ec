// Self-checking testbench of pso_best: random and corner cases (ties, equal
// fitness, zero bests) against a reference written here.
module tb_pso_best;
  import pso_pkg::*;
  int checks = 0, failures = 0;

  fix_t x, pbest, gbest, pbest_o, gbest_o;
  fit_t fit, pfit, gfit, pfit_o, gfit_o;
  logic pbest_upd, gbest_upd;

  pso_best dut (.x(x), .fit(fit), .pbest(pbest), .pfit(pfit), .gbest(gbest), .gfit(gfit),
    .pbest_o(pbest_o), .pfit_o(pfit_o), .gbest_o(gbest_o), .gfit_o(gfit_o),
    .pbest_upd(pbest_upd), .gbest_upd(gbest_upd));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fix_t ep, eg; fit_t epf, egf; bit pu, gu;
    for (int i = 0; i < 5000; i++) begin
      x = fix_t'($urandom_range(0, 65535)); pbest = fix_t'($urandom_range(0, 65535));
      gbest = fix_t'($urandom_range(0, 65535));
      fit  = fit_t'($urandom_range(0, 20));
      pfit = (i % 7 == 0) ? fit : fit_t'($urandom_range(0, 20));
      gfit = (i % 5 == 0) ? pfit : fit_t'($urandom_range(0, 20));
      if (i % 11 == 0) begin pfit = 0; gfit = 0; end
      #1;
      // reference: keep the larger fitness, ties keep the stored one
      pu = int'(fit) > int'(pfit);
      ep = pu ? x : pbest; epf = pu ? fit : pfit;
      gu = int'(epf) > int'(gfit);
      eg = gu ? ep : gbest; egf = gu ? epf : gfit;
      checks++;
      if (pbest_o !== ep || pfit_o !== epf || gbest_o !== eg || gfit_o !== egf ||
          pbest_upd !== pu || gbest_upd !== gu) begin
        failures++;
        if (failures < 10) $display("FAIL case %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
