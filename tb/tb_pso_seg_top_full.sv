// Full-size run of pso_seg_top with every parameter at its default: one
// 250 x 250 colour image, 80 particles, 100 iterations.
//
// The image is generated here: a black background, a large uniformly
// coloured disc (the most frequent gray level), a textured ring around it
// and random speckle inside the disc.  The testbench computes the gray
// image and its histogram, uploads the image, runs one segmentation and
// checks the interrupt order, that the threshold is the most frequent level
// and its fitness is that level's count, the number of clocks of the run
// against the schedule of the stages, and every pixel of the binary image.
module tb_pso_seg_top_full;
  import pso_pkg::*;
  localparam int IMG_W = 250;
  localparam int IMG_H = 250;
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

  pso_seg_top dut (
    .clk(clk), .rst_n(rst_n), .load_we(load_we), .load_addr(load_addr), .load_rgb(load_rgb),
    .start(start), .busy(busy), .irq_start(irq_start), .irq_seg(irq_seg), .irq_end(irq_end),
    .phase(phase), .pbest_evt(pbest_evt), .gbest_evt(gbest_evt), .iter_evt(iter_evt),
    .threshold(threshold), .threshold_fit(threshold_fit),
    .disp_addr(disp_addr), .disp_pixel(disp_pixel));

  rgb_t img [NPIX];
  int   gray [NPIX];
  int   hist [LEVELS];
  int   evt_order [$];
  int   n_pb, n_gb, n_iter;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (irq_start) evt_order.push_back(1);
    if (irq_seg)   evt_order.push_back(2);
    if (irq_end)   evt_order.push_back(3);
    if (pbest_evt) n_pb++;
    if (gbest_evt) n_gb++;
    if (iter_evt)  n_iter++;
  end

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mx, arg, ones, cycles, dx, dy, r2, sched;
    load_we = 0; load_addr = 0; load_rgb = 0; start = 0; disp_addr = 0;
    n_pb = 0; n_gb = 0; n_iter = 0;
    for (int l = 0; l < LEVELS; l++) hist[l] = 0;
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        int a;
        a = y * IMG_W + x;
        dx = x - 125; dy = y - 125; r2 = dx * dx + dy * dy;
        if (r2 < 100 * 100) img[a] = ($urandom_range(0, 9) == 0) ? rgb_t'($urandom) : 24'hB4A0A0;
        else if (r2 < 118 * 118) img[a] = rgb_t'({3{8'($urandom_range(150, 255))}});
        else img[a] = 24'h000000;
        gray[a] = (77 * int'(img[a].r) + 150 * int'(img[a].g) + 29 * int'(img[a].b)) / 256;
        hist[gray[a]]++;
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < NPIX; a++) begin
      @(negedge clk);
      load_we = 1; load_addr = AW'(a); load_rgb = img[a];
    end
    @(negedge clk);
    load_we = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (busy) begin @(negedge clk); cycles++; end
    // conversion, histogram scan, swarm and thresholding; each stage adds
    // one clock for its registered go strobe and one for the sequencer to
    // sample its done strobe; the count starts one clock before the start edge
    sched = (NPIX + 1) + (LEVELS * NPIX + 1) + (80 + 2 + 2 * 80 * 100) + (NPIX + 1) + 2 * 4 + 1;
    $display("run took %0d clocks, stage schedule %0d", cycles, sched);
    check(cycles == sched, "run length");
    mx = 0; arg = 0;
    for (int l = 0; l < LEVELS; l++) if (hist[l] > mx) begin mx = hist[l]; arg = l; end
    check(int'(threshold_fit) == hist[threshold], $sformatf("fitness %0d vs count %0d", threshold_fit, hist[threshold]));
    check(int'(threshold) == arg, $sformatf("threshold %0d, most frequent level %0d", threshold, arg));
    check(n_iter == 100 && n_pb > 0 && n_gb > 0, "swarm ran");
    repeat (2) @(negedge clk);
    check(evt_order.size() == 3 && evt_order[0] == 1 && evt_order[1] == 2 && evt_order[2] == 3, "interrupt order");
    ones = 0;
    for (int a = 0; a < NPIX; a++) begin
      disp_addr = AW'(a);
      @(posedge clk); #1;
      check(disp_pixel == (gray[a] > int'(threshold)), $sformatf("pixel %0d", a));
      ones += int'(disp_pixel);
      @(negedge clk);
    end
    $display("threshold %0d (count %0d), %0d of %0d pixels above", threshold, threshold_fit, ones, NPIX);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
