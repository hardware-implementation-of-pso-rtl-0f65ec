// Image segmentation by particle swarm optimisation: the complete system.
//
// A colour image is uploaded into the image memory through the load port.
// On start the system converts it to gray scale into the gray memory,
// builds the gray-level histogram, lets a swarm of NPART particles search
// NITER iterations for the gray level of highest histogram fitness, and
// thresholds the gray image at that level into the one-bit binary image
// memory, which the display side reads through the display port.
//
//   load port -> image memory (RGB) -> rgb2gray -> gray memory
//   gray memory -> histogram_fitness <-> pso_core -> threshold
//   gray memory -> binarize (threshold) -> binary memory -> display port
//
// seg_sequencer orders the stages and raises the start, segmentation and
// end-process interrupts.  The gray memory has one read port, shared by the
// histogram scan and the thresholding pass, which never run together.
//
// Defaults follow the original architecture: 250 x 250 images, 80 particles, 100
// iterations, w = c1 = c2 = 0.5.  Memory organisation, port protocol and the
// gray memory are this implementation's choices.
//
// Timing: one processing run takes about 2*NPIX + 256*NPIX + NPART +
// 2*NPART*NITER clocks; the histogram scan dominates.  Loading and display
// reads may happen while idle; the display read has one clock of latency.
module pso_seg_top
  import pso_pkg::*;
#(
  parameter int unsigned IMG_W = 250,
  parameter int unsigned IMG_H = 250,
  parameter int unsigned NPART = 80,
  parameter int unsigned NITER = 100,
  localparam int unsigned NPIX = IMG_W * IMG_H,
  localparam int unsigned AW   = (NPIX > 1) ? $clog2(NPIX) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // image upload from acquisition
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  rgb_t          load_rgb,
  // control
  input  logic          start,
  output logic          busy,
  output logic          irq_start,
  output logic          irq_seg,
  output logic          irq_end,
  output logic [2:0]    phase,          // sequencer state
  output logic          pbest_evt,      // a personal best improved
  output logic          gbest_evt,      // the global best improved
  output logic          iter_evt,       // a swarm iteration completed
  output gray_t         threshold,
  output fit_t          threshold_fit,
  // display read port (one clock latency)
  input  logic [AW-1:0] disp_addr,
  output logic          disp_pixel
);

  // Sequencer
  logic conv_go, conv_done, hist_go, hist_done, pso_go, pso_done, bin_go, bin_done;

  seg_sequencer u_seq (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .phase(phase),
    .conv_go(conv_go), .conv_done(conv_done),
    .hist_go(hist_go), .hist_done(hist_done),
    .pso_go(pso_go),   .pso_done(pso_done),
    .bin_go(bin_go),   .bin_done(bin_done),
    .irq_start(irq_start), .irq_seg(irq_seg), .irq_end(irq_end)
  );

  // Image memory (RGB)
  logic [AW-1:0] img_raddr;
  rgb_t          img_rdata;
  frame_ram #(.WIDTH($bits(rgb_t)), .DEPTH(NPIX)) u_img_mem (
    .clk(clk), .we(load_we), .waddr(load_addr), .wdata(load_rgb),
    .raddr(img_raddr), .rdata(img_rdata)
  );

  // RGB to gray conversion
  logic          gray_we;
  logic [AW-1:0] gray_waddr;
  gray_t         gray_wdata;
  logic          conv_busy;
  rgb2gray #(.NPIX(NPIX)) u_conv (
    .clk(clk), .rst_n(rst_n), .start(conv_go), .busy(conv_busy), .done(conv_done),
    .rd_addr(img_raddr), .rd_data(img_rdata),
    .wr_en(gray_we), .wr_addr(gray_waddr), .wr_data(gray_wdata)
  );

  // Gray memory, read by the histogram scan and by thresholding
  logic [AW-1:0] gray_raddr, hist_raddr, bin_raddr;
  gray_t         gray_rdata;
  logic          hist_busy, bin_busy;
  assign gray_raddr = hist_busy ? hist_raddr : bin_raddr;

  frame_ram #(.WIDTH(PIX_W), .DEPTH(NPIX)) u_gray_mem (
    .clk(clk), .we(gray_we), .waddr(gray_waddr), .wdata(gray_wdata),
    .raddr(gray_raddr), .rdata(gray_rdata)
  );

  // Histogram fitness
  gray_t fit_level;
  fit_t  fit;
  histogram_fitness #(.NPIX(NPIX)) u_hist (
    .clk(clk), .rst_n(rst_n), .start(hist_go), .busy(hist_busy), .done(hist_done),
    .rd_addr(hist_raddr), .rd_data(gray_rdata),
    .fit_level(fit_level), .fit(fit)
  );

  // Particle swarm
  logic pso_busy;
  pso_core #(.NPART(NPART), .NITER(NITER)) u_pso (
    .clk(clk), .rst_n(rst_n), .start(pso_go), .busy(pso_busy), .done(pso_done),
    .threshold(threshold), .best_fit(threshold_fit),
    .fit_level(fit_level), .fit(fit),
    .pbest_evt(pbest_evt), .gbest_evt(gbest_evt), .iter_evt(iter_evt)
  );

  // Thresholding into the binary image
  logic          bin_we;
  logic [AW-1:0] bin_waddr;
  logic          bin_wdata;
  binarize #(.NPIX(NPIX)) u_bin (
    .clk(clk), .rst_n(rst_n), .start(bin_go), .threshold(threshold),
    .busy(bin_busy), .done(bin_done),
    .rd_addr(bin_raddr), .rd_data(gray_rdata),
    .wr_en(bin_we), .wr_addr(bin_waddr), .wr_data(bin_wdata)
  );

  // Binary image memory
  frame_ram #(.WIDTH(1), .DEPTH(NPIX)) u_bin_mem (
    .clk(clk), .we(bin_we), .waddr(bin_waddr), .wdata(bin_wdata),
    .raddr(disp_addr), .rdata(disp_pixel)
  );

  // The histogram scan and thresholding share the gray memory read port.
  a_one_reader: assert property (@(posedge clk) disable iff (!rst_n) !(hist_busy && bin_busy) && !(conv_busy && pso_busy))
    else $error("gray memory read port used by two stages");

endmodule
