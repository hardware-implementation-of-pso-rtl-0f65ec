// Self-checking testbench of histogram_fitness.  A behavioural gray memory
// with one clock of read latency holds a population with a skewed
// distribution (including levels 0 and 255 and long runs of one level); after
// the scan the fitness of all 256 levels is compared with a histogram counted
// here, and done must come LEVELS * NPIX + 1 clock edges after the edge that
// samples start.  Two different populations are scanned in turn.
module tb_histogram_fitness;
  import pso_pkg::*;
  localparam int NPIX = 300;
  localparam int AW = $clog2(NPIX);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done;
  logic [AW-1:0] rd_addr;
  gray_t rd_data, fit_level;
  fit_t  fit;
  gray_t img [NPIX];
  int    ref_hist [LEVELS];

  histogram_fitness #(.NPIX(NPIX)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .rd_addr(rd_addr), .rd_data(rd_data), .fit_level(fit_level), .fit(fit));

  always_ff @(posedge clk) rd_data <= img[rd_addr];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    start = 0; fit_level = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int l = 0; l < LEVELS; l++) ref_hist[l] = 0;
      for (int a = 0; a < NPIX; a++) begin
        if (a < 40)       img[a] = gray_t'(f == 0 ? 90 : 200);       // a peak
        else if (a == 40) img[a] = 8'd0;
        else if (a == 41) img[a] = 8'd255;
        else              img[a] = gray_t'($urandom_range(60, 140) + $urandom_range(0, 40) * f);
        ref_hist[img[a]]++;
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      check(cycles - 1 == LEVELS * NPIX + 1, $sformatf("edges from start to done %0d", cycles - 1));
      for (int l = 0; l < LEVELS; l++) begin
        fit_level = gray_t'(l);
        #1;
        check(int'(fit) == ref_hist[l], $sformatf("F(%0d) got %0d exp %0d", l, fit, ref_hist[l]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
