// Self-checking testbench of pso_core at the default swarm size (80
// particles, 100 iterations).  A histogram model answers the fitness
// look-ups.  Checked for each of three landscapes:
//  - the threshold's fitness equals the model's count at that level, and
//    equals the largest fitness the swarm ever looked up;
//  - iteration strobes: exactly NITER; personal-best and global-best
//    improvements happened;
//  - done comes NPART + 2 + 2*NPART*NITER clock edges after the start edge;
//  - on a single-peak landscape the swarm finds the peak exactly.
module tb_pso_core;
  import pso_pkg::*;
  localparam int NPART = 80;
  localparam int NITER = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, pbest_evt, gbest_evt, iter_evt;
  gray_t threshold, fit_level;
  fit_t best_fit, fit;
  int hist [LEVELS];

  pso_core #(.NPART(NPART), .NITER(NITER)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .threshold(threshold), .best_fit(best_fit), .fit_level(fit_level), .fit(fit),
    .pbest_evt(pbest_evt), .gbest_evt(gbest_evt), .iter_evt(iter_evt));

  assign fit = fit_t'(hist[fit_level]);

  int n_iter, n_pb, n_gb, max_seen;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && busy) begin
    if (iter_evt)  n_iter++;
    if (pbest_evt) begin
      n_pb++;
      if (int'(fit) > max_seen) max_seen = int'(fit);
    end
    if (gbest_evt) n_gb++;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, peak, mx;
    start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      // run 0: single peak at 137; run 1: single peak at 40;
      // run 2: two humps plus random noise
      peak = (run == 0) ? 137 : 40;
      for (int l = 0; l < LEVELS; l++) begin
        if (run < 2) hist[l] = 2000 - 6 * ((l > peak) ? l - peak : peak - l);
        else         hist[l] = 300 + ((l > 70 && l < 110) ? 900 - 20 * ((l > 90) ? l - 90 : 90 - l) : 0)
                                   + ((l > 170 && l < 230) ? 600 - 10 * ((l > 200) ? l - 200 : 200 - l) : 0)
                                   + $urandom_range(0, 50);
      end
      n_iter = 0; n_pb = 0; n_gb = 0; max_seen = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      check(cycles - 1 == NPART + 2 + 2 * NPART * NITER, $sformatf("edges from start to done %0d", cycles - 1));
      check(int'(best_fit) == hist[threshold], $sformatf("best fitness %0d vs F(%0d)=%0d", best_fit, threshold, hist[threshold]));
      check(int'(best_fit) == max_seen, $sformatf("best fitness %0d vs largest improvement %0d", best_fit, max_seen));
      check(n_iter == NITER, $sformatf("%0d iterations", n_iter));
      check(n_pb >= NPART, $sformatf("%0d pbest improvements", n_pb));
      check(n_gb > 0, "gbest improved");
      if (run < 2) check(int'(threshold) == peak, $sformatf("run %0d threshold %0d peak %0d", run, threshold, peak));
      mx = 0;
      for (int l = 0; l < LEVELS; l++) if (hist[l] > mx) mx = hist[l];
      $display("run %0d: threshold %0d fitness %0d (max %0d), pbest %0d gbest %0d", run, threshold, best_fit, mx, n_pb, n_gb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
