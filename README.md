# Image segmentation by particle swarm optimisation

This design turns a colour image into a binary (two-level) image by choosing
one gray-level threshold. The threshold is not computed in closed form. A
swarm of 80 particles searches for it. Each particle is a candidate gray
level, and its quality ("fitness") is how often that level occurs in the
image's histogram. After 100 iterations the swarm's best level becomes the
threshold. Every pixel brighter than the threshold is written as 1, every
other pixel as 0.

The RTL is a SystemVerilog rendering of a published FPGA architecture for
PSO-based segmentation. That architecture was built for a Virtex-5 with a
block-diagram tool, clocked at 100 MHz, and evaluated on 250 x 250 test
images. The algorithm, the block split, the counting histogram, the
update equations and the swarm parameters come from it. Number formats,
widths, handshakes, memory organisation and several small rules are this
implementation's own choices. They are listed in
[Departures and own choices](#departures-and-own-choices).

## Data flow

```
 load port ──► image memory (RGB, 24 b) ──► rgb2gray ──► gray memory (8 b)
                                                              │
                          ┌───────────────────────────────────┤
                          ▼                                   ▼
                 histogram_fitness  ◄── F(b) look-ups ──  binarize ◄── threshold
                          ▲                                   │
                          └──────────── pso_core ─────────────┘ (threshold)
                                                              ▼
                                          binary memory (1 b) ──► display port
```

`seg_sequencer` runs the stages one after another and raises three
interrupt pulses:

| pulse       | when                                                         |
|-------------|--------------------------------------------------------------|
| `irq_start` | `start` accepted; RGB to gray conversion begins              |
| `irq_seg`   | gray image ready; histogram scan begins, then swarm, then thresholding |
| `irq_end`   | binary image complete and readable through the display port  |

Each stage gets a one-clock `go` strobe and answers with a one-clock
`done` strobe. The gray memory has one read port. The histogram scan and the
thresholding pass share it, and they never run at the same time. An
assertion in the top checks this.

## The fitness: a counting histogram

The fitness of gray level *b* is the share of pixels whose intensity is
exactly *b*:

    F(b) = (1/n) · Σ_i δ(I_i − b)

`histogram_fitness` builds the histogram the way the original architecture
does: by counting, not by incrementing bins.

- A level counter walks 0 … 255.
- For each level, a pixel counter reads every pixel of the stored population.
- A comparator tests each pixel against the level, and an accumulator counts
  the matches.
- After the last pixel of a level, the count is written into that level's bin
  and the accumulator restarts.

This costs 256 × n clocks, one comparison per clock. At 250 × 250 that is
16 million clocks, about 160 ms at 100 MHz. It is by far the longest stage.
The original limited the histogram to a part of the image to cut this cost,
but it does not give the size of that part. Here the whole image is scanned
by default. `NPIX` on `histogram_fitness` can be lowered to scan only the
first `NPIX` pixels.

The factor 1/n is dropped. It is the same for every level, so it never
changes which of two fitness values is larger. `fit` is therefore a pixel
count (20 bits).

Note what this fitness does. Maximising F(b) finds the most frequent gray
level. For images with a large uniform region, that region's level becomes
the threshold.

## The swarm (`pso_core`)

### Particle state and number formats

Each particle holds a position `x`, a velocity `v`, its personal best
position `pbest` and the fitness there `pfit` (`particle_t` in `pso_pkg`).
The swarm also holds the global best `gbest` and its fitness.

| quantity                 | format                         |
|--------------------------|--------------------------------|
| x, v, pbest, gbest       | signed Q10.8, 18 bits          |
| w, c1, c2                | unsigned Q2.8 (0.5 = 128)      |
| random r1, r2            | unsigned Q0.8, in [0, 1)       |
| fitness                  | unsigned count, 20 bits        |

The fitness of a particle is read at the integer part of its position,
saturated to 0 … 255.

### Flow

1. **INIT** (`pso_init`). Each particle gets `x = 255·r1` and
   `v = −VMAX + 2·VMAX·r2`: uniform draws between each range's minimum and
   maximum. `pbest`, `pfit`, `gbest` and the global fitness start at 0.
2. **EVAL**, one particle per clock (`pso_best`). If F(x) > pfit, the
   particle's personal best becomes x. If the resulting pfit > global
   fitness, the global best becomes that personal best. After the last
   particle, gbest is the best of all personal bests.
3. **UPDATE**, one particle per clock (`pso_update`):

       v' = w·v + c1·r1·(pbest − x) + c2·r2·(gbest − x)
       x' = x + v'

   Here w = c1 = c2 = 0.5. The random fractions r1, r2 are fresh for every
   particle. Products are truncated toward −∞. v' is saturated to ±VMAX
   gray levels (default 32), and x' to 0 … 255.
4. EVAL and UPDATE repeat `NITER` = 100 times. Then `threshold` = integer
   part of gbest, `best_fit` = its fitness, and `done` pulses.

"Better" means a strictly larger count. On a tie, the stored best is kept.

### How reliable the search is

The fitness landscape is the histogram itself. Where the image is smooth
or noisy, the histogram has broad humps, and the swarm climbs them well. In
the tests it found the exact peak of single-peak landscapes and the largest
tissue level of a noisy phantom. Where the image has only a few exact
levels, the landscape is a set of isolated spikes. A particle then scores
only when its integer position lands exactly on a spike. The swarm can
settle on a smaller spike and miss the largest one. A noise-free four-level
phantom showed exactly this.

A run of `pso_core` takes `NPART + 2 + 2·NPART·NITER` clocks from the start
edge to `done`. That is 16,082 clocks at the defaults.

### Random numbers

Random numbers come from `lfsr`, a Fibonacci LFSR. All cells shift one
place left per step. The leftmost cell is the output. The new rightmost bit
is the XOR of the tapped cells. It is 16 bits wide with taps 16, 15, 13, 4,
so its period is 2^16 − 1. The `STEPS` parameter applies several shifts per
clock. The initialisation block and the update path each own an LFSR with
`STEPS = 16`. Each clock therefore yields 16 new bits: the low byte is r1
and the high byte is r2.

## Timing of one run

From the edge that samples `start` to the end of `busy`:

    (NPIX+1) + (256·NPIX+1) + (NPART+2+2·NPART·NITER) + (NPIX+1) + 8 clocks

In order, the terms are the conversion, the histogram scan, the swarm, the
thresholding pass, and two hand-over clocks per stage. At the defaults this
is 16,141,094 clocks, about 161 ms at 100 MHz. The full-size testbench checks
this number exactly.

## Top-level interface (`pso_seg_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset |
| `load_we`, `load_addr`, `load_rgb` | in | 1, 16, 24 | write one RGB pixel (`{r,g,b}`) of the image, address = row·IMG_W + column |
| `start` | in | 1 | begin processing the uploaded image; ignored while `busy` |
| `busy` | out | 1 | processing in progress |
| `irq_start`, `irq_seg`, `irq_end` | out | 1 | interrupt pulses, see above |
| `phase` | out | 3 | sequencer state (0 idle, 1 convert, 2 histogram, 3 swarm, 4 threshold) |
| `pbest_evt`, `gbest_evt`, `iter_evt` | out | 1 | one-clock strobes: a personal best improved, the global best improved, an iteration ended |
| `threshold`, `threshold_fit` | out | 8, 20 | threshold found and its histogram count |
| `disp_addr` → `disp_pixel` | in → out | 16 → 1 | binary image read, one clock of latency |

Parameters: `IMG_W = 250`, `IMG_H = 250`, `NPART = 80`, `NITER = 100`.
The swarm's `W`, `C1`, `C2`, `VMAX` and seeds are parameters of `pso_core`.

Only load or read the image memories while `busy` is low. The load port and
the conversion stage use different ports of the image memory, but nothing
stops a load during conversion.

## Departures and own choices

What follows the original architecture:

- The stage chain: colour image memory, RGB to gray, PSO segmentation,
  binary image memory, display.
- The three interrupts.
- LFSR random numbers (shift-left Fibonacci structure).
- Random initialisation between minimum and maximum, with zero bests.
- The counting histogram fitness.
- The pbest/gbest rule and the velocity and position equations.
- 80 particles, 100 iterations, w = c1 = c2 = 0.5.
- 250 × 250 images.

What is this implementation's own choice:

- **Gray conversion** uses the BT.601 luma weights (77, 150, 29)/256. The
  original names the stage but not its formula.
- **A separate gray memory** holds the gray image between conversion and the
  histogram and thresholding stages.
- **Histogram population**: the whole image by default. See above.
- **Update datapath**: the original's block diagram of the update stage shows
  only constant multipliers by 0.5 and subtract-labelled adders. This design
  follows the equations instead: the three terms are summed, and both random
  factors are included.
- **Number formats**: all widths and fixed-point formats. The original only
  states that fixed point is used throughout.
- **Velocity and position**: the saturation, and the velocity limit of 32
  gray levels.
- **"Better" and polarity**: "better" means a larger count. The binary
  output is 1 for gray > threshold.
- **LFSR**: the width, taps, seeds, and multi-step stepping.
- **Schedule**: one particle per clock in each phase, in a sequential
  schedule. The go/done handshakes and interrupt pulses are also this
  design's own.
- **Compact-flash reader and display controller**: neither is part of this
  RTL. The image enters through `load_*` and leaves through `disp_*`.

The original reports its results only as visual comparisons with a software
version, plus FPGA resource use. No bit-exact reference exists. The
testbenches therefore check the RTL against independent models of the
equations above, not against published numbers.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_lfsr` | bit stream against the recurrence, period 65,535, 16-step jumps, load |
| `tb_frame_ram` | random traffic against an array, read-during-write |
| `tb_rgb2gray` | every pixel against the luma formula, one write per address, latency |
| `tb_histogram_fitness` | all 256 bins against a counted histogram, two populations, latency |
| `tb_pso_init` | particles against the recomputed LFSR stream, index coverage, latency |
| `tb_pso_best` | random and tie cases against a reference |
| `tb_pso_update` | 20,000 cases against floating-point evaluation with floor and saturation |
| `tb_pso_core` | finds the peak of two single-peak landscapes; threshold fitness = largest seen; iteration count; latency |
| `tb_seg_sequencer` | stage and interrupt order over five runs, start while busy |
| `tb_pso_seg_top` | end to end at 24 × 20 pixels: three colour images and a gray-scale brain-slice phantom. Checks interrupt order, that the threshold is the dominant level (for the phantom, a white-matter level), and every output pixel. Each mechanism (interrupts, pbest and gbest improvements, iterations, start while busy, re-run) must occur. |
| `tb_pso_seg_top_full` | one run at all defaults (250 × 250, 80 particles, 100 iterations), including the exact run length |

Run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl rtl/pso_pkg.sv tb/tb_pso_seg_top.sv \
          -y rtl --top-module tb_pso_seg_top
./obj_dir/Vtb_pso_seg_top
```

Replace the names to run another testbench. The full-size run simulates 16
million clocks and takes about ten seconds.

## Files

`rtl/pso_pkg.sv` holds the shared types and formats. The other `rtl/` files
are one module each: `lfsr`, `frame_ram`, `rgb2gray`, `histogram_fitness`,
`pso_init`, `pso_best`, `pso_update`, `pso_core`, `binarize`,
`seg_sequencer` and the top, `pso_seg_top`. Each file opens with a comment
giving its function, interface and timing.
