// Fitness block: builds the gray-level histogram of the pixel population and
// answers fitness look-ups F(b) for candidate thresholds b.
//
// The fitness of a gray level b is the share of pixels whose intensity is
// exactly b, F(b) = (1/n) * sum_i delta(I_i - b).  Following the original architecture's
// counting structure, a level counter steps through the gray levels 0..255;
// for each level a pixel counter reads every pixel of the stored population,
// a comparator tests it against the level and an accumulator counts the
// matches.  When the last pixel of a level has been compared the count is
// written into the histogram bin of that level and the accumulator restarts.
// The scan therefore takes LEVELS * NPIX clocks, one comparison per clock.
//
// The stored count is returned as the fitness: the factor 1/n is the same
// for every level, so it changes no comparison and is left out (fit_t counts
// pixels, not fractions).  The population is the whole gray frame buffer;
// the original limits it to "a part" of the image without giving the size, so
// NPIX can be set smaller to scan only the first NPIX pixels.
//
// Interface: start begins a scan (ignored while busy); the unit reads the
// gray frame buffer through rd_addr/rd_data (one clock latency).  done pulses
// one clock LEVELS*NPIX+1 clocks after start.  fit_level/fit is a
// combinational read of the histogram bins, valid after done.
module histogram_fitness
  import pso_pkg::*;
#(
  parameter int unsigned NPIX = 62500,
  localparam int unsigned AW = (NPIX > 1) ? $clog2(NPIX) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // population read port (one clock latency)
  output logic [AW-1:0] rd_addr,
  input  gray_t         rd_data,
  // fitness look-up
  input  gray_t         fit_level,
  output fit_t          fit
);

  fit_t          hist [LEVELS];

  logic          issuing;
  gray_t         level;       // level counter (issue stage)
  logic          cmp_vld;     // rd_data is valid this clock
  gray_t         level_d;     // level belonging to rd_data
  logic          last_d;      // rd_data is the last pixel of level_d
  fit_t          acc;         // match accumulator
  logic          match;
  fit_t          acc_nxt;

  assign match   = cmp_vld && (rd_data == level_d);
  assign acc_nxt = acc + fit_t'(match);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      level   <= '0;
      rd_addr <= '0;
      cmp_vld <= 1'b0;
      level_d <= '0;
      last_d  <= 1'b0;
      acc     <= '0;
      done    <= 1'b0;
    end else begin
      done    <= 1'b0;
      cmp_vld <= issuing;
      level_d <= level;
      last_d  <= issuing && (rd_addr == AW'(NPIX - 1));
      if (start && !busy) begin
        issuing <= 1'b1;
        level   <= '0;
        rd_addr <= '0;
        acc     <= '0;
      end else begin
        if (issuing) begin
          if (rd_addr == AW'(NPIX - 1)) begin
            rd_addr <= '0;
            if (level == gray_t'(LEVELS - 1)) issuing <= 1'b0;
            else                              level   <= level + 1'b1;
          end else begin
            rd_addr <= rd_addr + 1'b1;
          end
        end
        if (cmp_vld) begin
          acc <= last_d ? '0 : acc_nxt;
          if (last_d && level_d == gray_t'(LEVELS - 1)) done <= 1'b1;
        end
      end
    end
  end

  // Histogram bins: written once per level at the end of its pass.
  always_ff @(posedge clk) begin
    if (cmp_vld && last_d) hist[level_d] <= acc_nxt;
  end

  assign busy = issuing | cmp_vld;
  assign fit  = hist[fit_level];

endmodule
