// Self-checking testbench of pso_init.  The LFSR bit stream is recomputed
// here from the seed with s[n+16] = s[n]^s[n+1]^s[n+3]^s[n+12]; particle k
// must get the register state after 16k steps, x = 255 * low byte and
// v = -32*256 + 64 * high byte (Q.8), zero personal best and fitness.  Every
// index must be written once, done must follow the last write, and a second
// start must continue the random stream.
module tb_pso_init;
  import pso_pkg::*;
  localparam int NPART = 80;
  localparam int VMAX = 32;
  localparam int IW = $clog2(NPART);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, wr_en;
  logic [IW-1:0] wr_idx;
  particle_t wr_particle;

  pso_init #(.NPART(NPART), .XMIN(0), .XMAX(255), .VMAX(VMAX), .SEED(16'h1D2B)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .wr_en(wr_en), .wr_idx(wr_idx), .wr_particle(wr_particle));

  bit s [0:8000];
  int written [NPART];
  int nwr;   // particles written so far, all runs

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] state_at(int n);
    logic [15:0] q;
    for (int j = 0; j < 16; j++) q[15 - j] = s[n + j];
    return q;
  endfunction

  always @(posedge clk) if (rst_n && wr_en) begin
    logic [15:0] q;
    q = state_at(16 * nwr);
    check(int'(wr_particle.x) == 255 * int'(q[7:0]), $sformatf("x of particle %0d", wr_idx));
    check(int'(wr_particle.v) == -VMAX * 256 + 2 * VMAX * int'(q[15:8]), $sformatf("v of particle %0d", wr_idx));
    check(wr_particle.pbest == 0 && wr_particle.pfit == 0, "bests cleared");
    written[wr_idx]++;
    nwr++;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] seed = 16'h1D2B;
    int cycles;
    nwr = 0;
    for (int i = 0; i < 16; i++) s[i] = seed[15 - i];
    for (int n = 0; n + 16 <= 8000; n++) s[n+16] = s[n] ^ s[n+1] ^ s[n+3] ^ s[n+12];
    start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      for (int k = 0; k < NPART; k++) written[k] = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      check(cycles - 1 == NPART, $sformatf("edges from start to done %0d", cycles - 1));
      for (int k = 0; k < NPART; k++) check(written[k] == 1, $sformatf("particle %0d written %0d", k, written[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
