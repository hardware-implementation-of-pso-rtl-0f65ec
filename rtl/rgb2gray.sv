// Colour-space conversion of the stored image from RGB to gray scale, the
// first processing stage after the image has been uploaded.
//
// After start the unit reads every pixel of the colour frame buffer in
// raster order, converts it with the ITU-R BT.601 luma weights in Q0.8,
// gray = (77 R + 150 G + 29 B) >> 8, and writes the result at the same
// address of the gray frame buffer.  The original architecture names this stage but does
// not give its formula; the weights are the usual luma ones and are this
// implementation's choice.
//
// Timing: one pixel per clock.  The read address is issued in the first
// clock, the word comes back one clock later and is written the same clock.
// done pulses for one clock, NPIX+1 clock edges after the edge that samples
// start; busy is high in between.
module rgb2gray
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
  // colour frame buffer read port (one clock latency)
  output logic [AW-1:0] rd_addr,
  input  rgb_t          rd_data,
  // gray frame buffer write port
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output gray_t         wr_data
);

  logic          issuing;   // read addresses still being issued
  logic          rd_vld;    // rd_data belongs to rd_addr of last clock
  logic [AW-1:0] addr_d;
  logic [17:0]   acc;

  // Luma weights, sum 256.
  always_comb begin
    acc = 18'(rd_data.r) * 18'd77 + 18'(rd_data.g) * 18'd150 + 18'(rd_data.b) * 18'd29;
  end

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
  assign wr_data = gray_t'(acc >> 8);

endmodule
