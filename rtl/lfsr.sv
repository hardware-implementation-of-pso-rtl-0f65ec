// Fibonacci linear feedback shift register used as the pseudo-random number
// generator of the PSO swarm.
//
// The register holds s_i (leftmost, q[WIDTH-1], the output bit) down to
// s_{i+L-1} (rightmost, q[0]).  On every enabled rising clock edge all cells
// move one place to the left and the new rightmost bit is the modulo-2 sum of
// the cells selected by the binary coefficient mask TAPS, as in the shift
// register recurrence S_{i+L} = c1 S_{i+L-1} + ... + cL S_i.  STEPS applies
// that shift STEPS times per clock, so one clock yields STEPS fresh bits; the
// swarm uses this to draw a whole random fraction per particle per clock.
//
// The register structure and recurrence follow the original architecture; the 16-bit width,
// the tap set 16,15,13,4 (a maximal-length polynomial, period 2^16-1), the
// seed and the multi-step option are this implementation's choices.
//
// Interface: load copies SEED into the register (synchronous); en advances
// it.  q is the full state, out the leftmost bit.  Reset loads SEED.
module lfsr #(
  parameter int unsigned WIDTH = 16,
  parameter logic [WIDTH-1:0] TAPS = 16'hD008,
  parameter logic [WIDTH-1:0] SEED = 16'hACE1,
  parameter int unsigned STEPS = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             en,
  output logic [WIDTH-1:0] q,
  output logic             out
);

  logic [WIDTH-1:0] nxt;

  always_comb begin
    nxt = q;
    for (int unsigned s = 0; s < STEPS; s++) begin
      nxt = {nxt[WIDTH-2:0], ^(nxt & TAPS)};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= SEED;
    else if (load) q <= SEED;
    else if (en)   q <= nxt;
  end

  assign out = q[WIDTH-1];

  // An all-zero state would lock the generator.
  initial assert (SEED != '0) else $error("lfsr: SEED must be non-zero");

endmodule
