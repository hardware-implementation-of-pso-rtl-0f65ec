// Initialisation block of the particle swarm: gives every particle a random
// position and velocity and clears its personal best.
//
// For particle i the block draws two random fractions r1, r2 in [0, 1) from
// its own LFSR and forms
//   x_i = XMIN + (XMAX - XMIN) * r1      (a gray level, in Q10.8)
//   v_i = -VMAX + 2 * VMAX * r2          (velocity, in Q10.8)
// i.e. a uniform draw between the minimum and maximum of each range.  The
// personal best position and its fitness start at 0, as does the swarm's
// global best (cleared by the swarm controller).  The LFSR is stepped 16
// times per clock so each particle gets 16 fresh bits: r1 is the low byte
// and r2 the high byte of the register.
//
// The random-range initialisation and the zero bests follow the original architecture; the
// search range 0..255, the velocity limit VMAX (in gray levels), the seed
// and the one-particle-per-clock schedule are this implementation's choices.
//
// Interface: start (ignored while busy) writes particles 0..NPART-1 on
// wr_en/wr_idx/wr_particle, one per clock, in the NPART clocks after start;
// done pulses with the clock edge that takes the last write, NPART edges
// after the edge that samples start.
module pso_init
  import pso_pkg::*;
#(
  parameter int unsigned NPART = 80,
  parameter int unsigned XMIN  = 0,
  parameter int unsigned XMAX  = 255,
  parameter int unsigned VMAX  = 32,
  parameter logic [15:0] SEED  = 16'h1D2B,
  localparam int unsigned IW = (NPART > 1) ? $clog2(NPART) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          wr_en,
  output logic [IW-1:0] wr_idx,
  output particle_t     wr_particle
);

  logic [15:0] rnd;
  rand_t       r1, r2;
  logic [IW-1:0] idx;
  logic        active;

  lfsr #(.WIDTH(16), .TAPS(16'hD008), .SEED(SEED), .STEPS(16)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .load (1'b0),
    .en   (active),
    .q    (rnd),
    .out  ()
  );

  assign r1 = rnd[7:0];
  assign r2 = rnd[15:8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      idx    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !active) begin
        active <= 1'b1;
        idx    <= '0;
      end else if (active) begin
        if (idx == IW'(NPART - 1)) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
        idx <= idx + 1'b1;
      end
    end
  end

  // (max - min) * r with r a Q0.8 fraction gives a Q.8 value directly.
  always_comb begin
    wr_particle.x     = fix_t'(XMIN << POS_FRAC) + fix_t'((XMAX - XMIN) * r1);
    wr_particle.v     = fix_t'(-(VMAX << POS_FRAC)) + fix_t'((2 * VMAX) * r2);
    wr_particle.pbest = '0;
    wr_particle.pfit  = '0;
  end

  assign busy   = active;
  assign wr_en  = active;
  assign wr_idx = idx;

endmodule
