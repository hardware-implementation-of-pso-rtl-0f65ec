// Self-checking testbench of lfsr.
//
// A one-step instance is checked bit by bit against the recurrence
// s[n+16] = s[n] ^ s[n+1] ^ s[n+3] ^ s[n+12] computed here from the seed,
// and its period is checked to be exactly 2^16 - 1.  A sixteen-step
// instance must, after each clock, hold the state the one-step instance
// reaches after sixteen clocks.  Load and enable are exercised.
module tb_lfsr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        load1, en1;
  logic [15:0] q1, q16;
  logic        out1, out16;
  logic        en16;

  lfsr #(.WIDTH(16), .TAPS(16'hD008), .SEED(16'hACE1), .STEPS(1)) dut1 (
    .clk(clk), .rst_n(rst_n), .load(load1), .en(en1), .q(q1), .out(out1));
  lfsr #(.WIDTH(16), .TAPS(16'hD008), .SEED(16'hACE1), .STEPS(16)) dut16 (
    .clk(clk), .rst_n(rst_n), .load(1'b0), .en(en16), .q(q16), .out(out16));

  // reference bit stream: s[0..15] are the seed bits, MSB first
  bit s [0:70000];
  logic [15:0] states [0:4096];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period;
    logic [15:0] seed = 16'hACE1;
    load1 = 0; en1 = 0; en16 = 0;
    for (int i = 0; i < 16; i++) s[i] = seed[15 - i];
    for (int n = 0; n + 16 <= 70000; n++) s[n+16] = s[n] ^ s[n+1] ^ s[n+3] ^ s[n+12];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(q1 == seed, "reset loads seed");
    // hold when disabled
    @(negedge clk);
    check(q1 == seed, "hold while en low");
    en1 = 1;
    period = 0;
    for (int n = 0; n < 65535; n++) begin
      check(out1 == s[n], $sformatf("bit %0d", n));
      if (n < 4096) states[n] = q1;
      @(negedge clk);
      period++;
      if (q1 == seed) break;
    end
    check(period == 65535, $sformatf("period %0d", period));
    // load restores the seed
    repeat (5) @(negedge clk);
    load1 = 1;
    @(negedge clk);
    load1 = 0; en1 = 0;
    check(q1 == seed, "load");
    // sixteen-step instance jumps 16 states per clock
    en16 = 1;
    for (int j = 1; j <= 200; j++) begin
      @(negedge clk);
      check(q16 == states[16*j], $sformatf("16-step state %0d", j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
