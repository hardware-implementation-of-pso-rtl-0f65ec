// End-to-end testbench of pso_seg_top at a reduced image size (24 x 20
// pixels; swarm at its default 80 particles and 100 iterations).
//
// Three colour images and one gray-scale image (R = G = B, a small phantom
// of a brain slice: dark background, bright skull ring, and three tissue
// levels of which one dominates) are generated, uploaded through the load
// port and processed.  The testbench computes the gray image with
// the luma weights and its histogram itself, then checks:
//  - the three interrupts come once each, in the order start, segmentation,
//    end-process, and busy ends with the end-process interrupt;
//  - the threshold's fitness equals this histogram's count at the threshold,
//    and the threshold is the most frequent gray level (each colour image has
//    one dominant level) or, for the phantom, a level of its largest tissue;
//  - every pixel read back through the display port equals
//    (gray > threshold).
// Mechanisms counted, each must occur: the three interrupts, personal-best
// and global-best improvements, swarm iterations, a start ignored while
// busy, and a re-run on a new image.
module tb_pso_seg_top;
  import pso_pkg::*;
  localparam int IMG_W = 24;
  localparam int IMG_H = 20;
  localparam int NPIX = IMG_W * IMG_H;
  localparam int AW = $clog2(NPIX);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          load_we, start, busy, irq_start, irq_seg, irq_end, disp_pixel;
  logic          pbest_evt, gbest_evt, iter_evt;
  logic [2:0]    phase;
  logic [AW-1:0] load_addr, disp_addr;
  rgb_t          load_rgb;
  gray_t         threshold;
  fit_t          threshold_fit;

  pso_seg_top #(.IMG_W(IMG_W), .IMG_H(IMG_H)) dut (
    .clk(clk), .rst_n(rst_n), .load_we(load_we), .load_addr(load_addr), .load_rgb(load_rgb),
    .start(start), .busy(busy), .irq_start(irq_start), .irq_seg(irq_seg), .irq_end(irq_end),
    .phase(phase), .pbest_evt(pbest_evt), .gbest_evt(gbest_evt), .iter_evt(iter_evt),
    .threshold(threshold), .threshold_fit(threshold_fit),
    .disp_addr(disp_addr), .disp_pixel(disp_pixel));

  rgb_t img [NPIX];
  int   gray [NPIX];
  int   hist [LEVELS];
  int   evt_order [$];
  int   n_irq_start, n_irq_seg, n_irq_end, n_pb, n_gb, n_iter, n_ignored, n_runs;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (irq_start) begin n_irq_start++; evt_order.push_back(1); end
    if (irq_seg)   begin n_irq_seg++;   evt_order.push_back(2); end
    if (irq_end)   begin n_irq_end++;   evt_order.push_back(3); end
    if (pbest_evt) n_pb++;
    if (gbest_evt) n_gb++;
    if (iter_evt)  n_iter++;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs 0-2: one dominant colour (a third of the pixels) on a varied
  // background.  Run 3: gray-scale phantom, R = G = B.
  task automatic make_image(int run);
    rgb_t dom;
    int dx, dy, r2;
    dom = (run == 0) ? 24'h6080A0 : (run == 1) ? 24'hD0C8B0 : 24'h302820;
    for (int l = 0; l < LEVELS; l++) hist[l] = 0;
    for (int a = 0; a < NPIX; a++) begin
      dx = (a % IMG_W) - IMG_W / 2; dy = (a / IMG_W) - IMG_H / 2;
      r2 = 4 * dx * dx + 5 * dy * dy;
      if (run == 3) begin
        int lv;
        if (r2 > 900)       lv = 0;                              // background
        else if (r2 > 700)  lv = 240;                            // skull
        else if (r2 < 100)  lv = 40;                             // fluid
        else if (a % 4 == 1) lv = 120;                           // gray matter
        else                lv = 180;                            // white matter
        if (lv != 0) lv += $urandom_range(0, 6) - 3;             // acquisition noise
        img[a] = {3{8'(lv)}};
      end
      else if (a % 3 == 0) img[a] = dom;
      else                 img[a] = rgb_t'($urandom);
      gray[a] = (77 * int'(img[a].r) + 150 * int'(img[a].g) + 29 * int'(img[a].b)) / 256;
      hist[gray[a]]++;
    end
  endtask

  initial begin
    int mx, arg, ones;
    load_we = 0; load_addr = 0; load_rgb = 0; start = 0; disp_addr = 0;
    n_irq_start = 0; n_irq_seg = 0; n_irq_end = 0; n_pb = 0; n_gb = 0; n_iter = 0;
    n_ignored = 0; n_runs = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      make_image(run);
      if (run == 3) for (int a = 0; a < NPIX; a++)
        check(gray[a] == int'(img[a].r), "gray-scale input keeps its level");
      for (int a = 0; a < NPIX; a++) begin
        @(negedge clk);
        load_we = 1; load_addr = AW'(a); load_rgb = img[a];
      end
      @(negedge clk);
      load_we = 0;
      evt_order.delete();
      start = 1;
      @(negedge clk);
      start = 0;
      // a second start in the middle of a run must be ignored
      repeat (NPIX * 10) @(negedge clk);
      if (busy) begin
        start = 1;
        @(negedge clk);
        start = 0;
        n_ignored++;
      end
      while (busy) @(negedge clk);
      repeat (2) @(negedge clk);
      n_runs++;
      check(evt_order.size() == 3 && evt_order[0] == 1 && evt_order[1] == 2 && evt_order[2] == 3,
            $sformatf("run %0d: interrupt order, %0d interrupts", run, evt_order.size()));
      mx = 0; arg = 0;
      for (int l = 0; l < LEVELS; l++) if (hist[l] > mx) begin mx = hist[l]; arg = l; end
      check(int'(threshold_fit) == hist[threshold], $sformatf("run %0d: fitness %0d vs count %0d", run, threshold_fit, hist[threshold]));
      if (run < 3) check(int'(threshold) == arg, $sformatf("run %0d: threshold %0d, dominant level %0d", run, threshold, arg));
      // phantom: the threshold must land in the white-matter hump
      else check(int'(threshold) >= 177 && int'(threshold) <= 183, $sformatf("run %0d: threshold %0d outside white matter", run, threshold));
      ones = 0;
      for (int a = 0; a < NPIX; a++) begin
        disp_addr = AW'(a);
        @(posedge clk); #1;
        check(disp_pixel == (gray[a] > int'(threshold)), $sformatf("run %0d pixel %0d", run, a));
        ones += int'(disp_pixel);
        @(negedge clk);
      end
      $display("run %0d: threshold %0d (count %0d), %0d of %0d pixels above", run, threshold, threshold_fit, ones, NPIX);
    end
    $display("mechanisms: irq_start %0d irq_seg %0d irq_end %0d pbest %0d gbest %0d iterations %0d ignored-start %0d runs %0d",
             n_irq_start, n_irq_seg, n_irq_end, n_pb, n_gb, n_iter, n_ignored, n_runs);
    check(n_irq_start == 4 && n_irq_seg == 4 && n_irq_end == 4, "each interrupt once per run");
    check(n_pb > 0, "personal-best improvements");
    check(n_gb > 0, "global-best improvements");
    check(n_iter == 4 * 100, "swarm iterations");
    check(n_ignored > 0, "start while busy exercised");
    check(n_runs == 4, "re-runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
