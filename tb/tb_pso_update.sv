// Self-checking testbench of pso_update.  Random particles, bests and
// random fractions are applied and the new velocity and position compared
// with the update equations evaluated here in floating point
// (floor of each product, saturation to +/-VMAX and 0..255), plus cases
// driven into both saturations.
module tb_pso_update;
  import pso_pkg::*;
  localparam int VMAX = 32;
  int checks = 0, failures = 0;
  int vsat = 0, xsat = 0;

  fix_t x, v, pbest, gbest, x_o, v_o;
  rand_t r1, r2;

  pso_update #(.W(COEF_HALF), .C1(COEF_HALF), .C2(COEF_HALF), .XMIN(0), .XMAX(255), .VMAX(VMAX)) dut (
    .x(x), .v(v), .pbest(pbest), .gbest(gbest), .r1(r1), .r2(r2), .x_o(x_o), .v_o(v_o));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real w, c1, c2, fr1, fr2, ev, ex;
    w = 0.5; c1 = 0.5; c2 = 0.5;
    for (int i = 0; i < 20000; i++) begin
      x     = fix_t'($urandom_range(0, 255 * 256));
      pbest = fix_t'($urandom_range(0, 255 * 256));
      gbest = fix_t'($urandom_range(0, 255 * 256));
      v     = fix_t'(int'($urandom_range(0, 2 * VMAX * 256)) - VMAX * 256);
      r1 = rand_t'($urandom); r2 = rand_t'($urandom);
      if (i % 13 == 0) begin x = 0; v = fix_t'(-VMAX * 256); pbest = 0; gbest = 0; end
      if (i % 17 == 0) begin x = fix_t'(255 * 256); v = fix_t'(VMAX * 256); pbest = x; gbest = x; end
      #1;
      fr1 = real'(r1) / 256.0; fr2 = real'(r2) / 256.0;
      // each term in units of 1/256 gray level, floored like the hardware
      ev = $floor(w * real'(v)) + $floor(c1 * fr1 * real'(pbest - x)) + $floor(c2 * fr2 * real'(gbest - x));
      if (ev > VMAX * 256)  begin ev = VMAX * 256; vsat++; end
      if (ev < -VMAX * 256) begin ev = -VMAX * 256; vsat++; end
      ex = real'(x) + ev;
      if (ex > 255 * 256) begin ex = 255 * 256; xsat++; end
      if (ex < 0)         begin ex = 0; xsat++; end
      checks++;
      if (int'(v_o) != int'(ev) || int'(x_o) != int'(ex)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d v=%0d p=%0d g=%0d r=%0d,%0d: got v=%0d x=%0d exp v=%0d x=%0d",
          x, v, pbest, gbest, r1, r2, v_o, x_o, int'(ev), int'(ex));
      end
    end
    checks++;
    if (xsat == 0) begin failures++; $display("FAIL position saturation never hit"); end
    $display("saturations: velocity %0d position %0d", vsat, xsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
