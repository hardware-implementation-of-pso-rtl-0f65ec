// Self-checking testbench of binarize.  A behavioural gray memory with one
// clock of read latency feeds the unit for several thresholds (including 0
// and 255); every written bit must equal (gray > threshold), every address
// must be written once, and done must come NPIX + 1 clocks after start.
module tb_binarize;
  import pso_pkg::*;
  localparam int NPIX = 400;
  localparam int AW = $clog2(NPIX);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, wr_en, wr_data;
  logic [AW-1:0] rd_addr, wr_addr;
  gray_t rd_data, th;
  gray_t img [NPIX];
  int    written [NPIX];
  int    ones;

  binarize #(.NPIX(NPIX)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .threshold(th), .busy(busy), .done(done),
    .rd_addr(rd_addr), .rd_data(rd_data), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  always_ff @(posedge clk) rd_data <= img[rd_addr];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && wr_en) begin
    check(wr_data == (int'(img[wr_addr]) > int'(th)),
          $sformatf("pixel %0d gray %0d th %0d got %0d", wr_addr, img[wr_addr], th, wr_data));
    written[wr_addr]++;
    ones += int'(wr_data);
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    gray_t ths [4] = '{8'd0, 8'd100, 8'd173, 8'd255};
    start = 0; th = 0;
    for (int a = 0; a < NPIX; a++) img[a] = gray_t'($urandom);
    img[0] = 8'd100; img[1] = 8'd101; img[2] = 8'd0; img[3] = 8'd255;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (ths[t]) begin
      for (int a = 0; a < NPIX; a++) written[a] = 0;
      ones = 0;
      th = ths[t];
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      check(cycles - 1 == NPIX + 1, $sformatf("edges from start to done %0d", cycles));
      for (int a = 0; a < NPIX; a++) check(written[a] == 1, $sformatf("addr %0d written %0d", a, written[a]));
      if (th == 8'd255) check(ones == 0, "no pixel above 255");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
