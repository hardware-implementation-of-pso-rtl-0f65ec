// Self-checking testbench of seg_sequencer.  Each stage is modelled by a
// responder that answers its go strobe with done after a random delay.  The
// testbench checks the stage order conversion -> histogram -> swarm ->
// thresholding, that each go and each interrupt fires exactly once per run
// and at the right moment, that start is ignored while busy, and busy.
module tb_seg_sequencer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy;
  logic [2:0] phase;
  logic conv_go, conv_done, hist_go, hist_done, pso_go, pso_done, bin_go, bin_done;
  logic irq_start, irq_seg, irq_end;

  seg_sequencer dut (.clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .phase(phase),
    .conv_go(conv_go), .conv_done(conv_done), .hist_go(hist_go), .hist_done(hist_done),
    .pso_go(pso_go), .pso_done(pso_done), .bin_go(bin_go), .bin_done(bin_done),
    .irq_start(irq_start), .irq_seg(irq_seg), .irq_end(irq_end));

  // event log: 1 conv_go, 2 hist_go, 3 pso_go, 4 bin_go, 5 irq_start, 6 irq_seg, 7 irq_end
  int log_q [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // stage responders
  task automatic respond(ref logic go, ref logic dn);
    forever begin
      @(posedge clk);
      if (go) begin
        repeat ($urandom_range(0, 6)) @(posedge clk);
        #1 dn = 1;
        @(posedge clk);
        #1 dn = 0;
      end
    end
  endtask

  initial begin conv_done = 0; respond(conv_go, conv_done); end
  initial begin hist_done = 0; respond(hist_go, hist_done); end
  initial begin pso_done  = 0; respond(pso_go, pso_done);   end
  initial begin bin_done  = 0; respond(bin_go, bin_done);   end

  always @(posedge clk) if (rst_n) begin
    if (conv_go)   log_q.push_back(1);
    if (hist_go)   log_q.push_back(2);
    if (pso_go)    log_q.push_back(3);
    if (bin_go)    log_q.push_back(4);
    if (irq_start) log_q.push_back(5);
    if (irq_seg)   log_q.push_back(6);
    if (irq_end)   log_q.push_back(7);
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_log [8] = '{1, 5, 2, 6, 3, 4, 7, 0};
    start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 5; run++) begin
      log_q.delete();
      @(negedge clk);
      check(!busy, "idle before start");
      start = 1;
      @(negedge clk);
      start = (run == 2);   // hold start high in one run: must not restart
      check(busy, "busy after start");
      while (busy) @(negedge clk);
      start = 0;
      repeat (3) @(negedge clk);
      // conv_go and irq_start arrive in the same clock, as do hist_go and irq_seg
      check(log_q.size() == 7, $sformatf("run %0d: %0d events", run, log_q.size()));
      for (int i = 0; i < 7 && i < log_q.size(); i++)
        check(log_q[i] == exp_log[i], $sformatf("run %0d event %0d is %0d exp %0d", run, i, log_q[i], exp_log[i]));
      if (run == 2) begin
        // start still high when idle restarts the flow: clear it out
        while (busy) @(negedge clk);
        repeat (3) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
