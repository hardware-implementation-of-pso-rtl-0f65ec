// Self-checking testbench of rgb2gray.  A behavioural colour memory with one
// clock of read latency feeds the converter; every written gray pixel is
// compared with (77 R + 150 G + 29 B) / 256 computed here, every address
// must be written exactly once, and done must come NPIX + 1 clocks after
// start.  Two frames are converted back to back.
module tb_rgb2gray;
  import pso_pkg::*;
  localparam int NPIX = 500;
  localparam int AW = $clog2(NPIX);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  rgb_t rd_data;
  gray_t wr_data;
  rgb_t  img [NPIX];
  int    written [NPIX];

  rgb2gray #(.NPIX(NPIX)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .rd_addr(rd_addr), .rd_data(rd_data), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  always_ff @(posedge clk) rd_data <= img[rd_addr];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && wr_en) begin
    int exp_g;
    exp_g = (77 * int'(img[wr_addr].r) + 150 * int'(img[wr_addr].g) + 29 * int'(img[wr_addr].b)) / 256;
    check(int'(wr_data) == exp_g, $sformatf("pixel %0d got %0d exp %0d", wr_addr, wr_data, exp_g));
    written[wr_addr]++;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    start = 0;
    for (int f = 0; f < 2; f++) begin
      for (int a = 0; a < NPIX; a++) begin
        img[a] = rgb_t'($urandom);
        if (a < 4) img[a] = (a == 0) ? 24'hFFFFFF : (a == 1) ? 24'h000000 : (a == 2) ? 24'hFF0000 : 24'h00FF00;
        written[a] = 0;
      end
      repeat (2) @(negedge clk);
      rst_n = 1;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      check(cycles - 1 == NPIX + 1, $sformatf("edges from start to done %0d", cycles - 1));
      @(negedge clk);
      check(!busy, "idle after done");
      for (int a = 0; a < NPIX; a++) check(written[a] == 1, $sformatf("addr %0d written %0d times", a, written[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
