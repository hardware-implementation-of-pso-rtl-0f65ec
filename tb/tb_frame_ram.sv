// Self-checking testbench of frame_ram: random writes and reads against a
// reference array, one-clock read latency, and read-during-write returning
// the old word.
module tb_frame_ram;
  localparam int DEPTH = 1000;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [23:0]   wdata, rdata;
  logic [23:0]   ref_mem [DEPTH];

  frame_ram #(.WIDTH(24), .DEPTH(DEPTH)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] expect_q;
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = 24'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    // random reads, some with a simultaneous write to the same address
    for (int i = 0; i < 3000; i++) begin
      raddr = AW'($urandom_range(DEPTH - 1));
      expect_q = ref_mem[raddr];
      we = ($urandom_range(3) == 0);
      waddr = ($urandom_range(1) == 0) ? raddr : AW'($urandom_range(DEPTH - 1));
      wdata = 24'($urandom);
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", raddr, rdata, expect_q);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
