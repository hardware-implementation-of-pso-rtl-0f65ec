// Frame buffer: simple dual-port RAM with one write port and one read port
// with one clock of read latency.
//
// The original architecture keeps the uploaded colour image and the binary result in
// memories between acquisition, processing and display; this RAM serves as
// both (and as the gray-image store that the conversion writes and the
// histogram and thresholding stages read).  The memory organisation is this
// implementation's choice: one word per pixel, raster order, address =
// row * width + column.
//
// Timing: a write with we high lands at the clock edge; rdata shows the word
// at raddr one clock after raddr is presented.  Read-during-write of the
// same address returns the old word.
module frame_ram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 62500,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
