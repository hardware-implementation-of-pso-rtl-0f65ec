// Thresholding stage: turns the gray image into the binary segmented image
// using the threshold found by the particle swarm (the swarm's best
// position).
//
// After start the unit reads every pixel of the gray frame buffer in raster
// order and writes 1 to the binary frame buffer where gray > threshold and
// 0 elsewhere.  The original architecture states that the output is a binary image
// produced from the threshold; the strict "greater than" and the polarity
// (bright = 1) are this implementation's choice.
//
// Timing: one pixel per clock, read latency one clock; done pulses one clock
// NPIX+1 clock edges after the edge that samples start.  threshold must be
// stable while busy.
module binarize
  import pso_pkg::*;
#(
  parameter int unsigned NPIX = 62500,
  localparam int unsigned AW = (NPIX > 1) ? $clog2(NPIX) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  gray_t         threshold,
  output logic          busy,
  output logic          done,
  // gray frame buffer read port (one clock latency)
  output logic [AW-1:0] rd_addr,
  input  gray_t         rd_data,
  // binary frame buffer write port
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic          wr_data
);

  logic          issuing;
  logic          rd_vld;
  logic [AW-1:0] addr_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      rd_vld  <= 1'b0;
      rd_addr <= '0;
      addr_d  <= '0;
      done    <= 1'b0;
    end else begin
      done   <= 1'b0;
      rd_vld <= issuing;
      addr_d <= rd_addr;
      if (start && !busy) begin
        issuing <= 1'b1;
        rd_addr <= '0;
      end else if (issuing) begin
        if (rd_addr == AW'(NPIX - 1)) issuing <= 1'b0;
        else                          rd_addr <= rd_addr + 1'b1;
      end
      if (rd_vld && !issuing) done <= 1'b1;
    end
  end

  assign busy    = issuing | rd_vld;
  assign wr_en   = rd_vld;
  assign wr_addr = addr_d;
  assign wr_data = (rd_data > threshold);

endmodule
