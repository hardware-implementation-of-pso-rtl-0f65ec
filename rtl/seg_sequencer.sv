// Task sequencer of the segmentation system: runs the processing stages in
// order and raises the three interrupts of the flow.
//
//   start interrupt        - the colour image has been uploaded into the
//                            image memory and start is given; the RGB to
//                            gray conversion begins;
//   segmentation interrupt - the gray image is ready; the histogram scan
//                            and the swarm search run, then the gray image
//                            is thresholded into the binary image memory;
//   end-process interrupt  - the binary image is complete and can be
//                            displayed.
//
// The three interrupts and the stage order follow the original architecture.  Each
// interrupt is a one-clock pulse here; the encoding as pulses, the explicit
// histogram phase and the go/done handshake with each stage are this
// implementation's choices.
//
// Interface: each stage gets a one-clock go strobe and answers with a
// one-clock done strobe.  start is taken only in IDLE.  busy is high from
// the start clock until the end-process interrupt.
module seg_sequencer (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  output logic [2:0] phase,     // current state, for observation
  output logic conv_go,
  input  logic conv_done,
  output logic hist_go,
  input  logic hist_done,
  output logic pso_go,
  input  logic pso_done,
  output logic bin_go,
  input  logic bin_done,
  output logic irq_start,
  output logic irq_seg,
  output logic irq_end
);

  typedef enum logic [2:0] {P_IDLE, P_CONV, P_HIST, P_PSO, P_BIN} phase_e;
  phase_e st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= P_IDLE;
      conv_go   <= 1'b0;
      hist_go   <= 1'b0;
      pso_go    <= 1'b0;
      bin_go    <= 1'b0;
      irq_start <= 1'b0;
      irq_seg   <= 1'b0;
      irq_end   <= 1'b0;
    end else begin
      conv_go   <= 1'b0;
      hist_go   <= 1'b0;
      pso_go    <= 1'b0;
      bin_go    <= 1'b0;
      irq_start <= 1'b0;
      irq_seg   <= 1'b0;
      irq_end   <= 1'b0;
      unique case (st)
        P_IDLE: if (start) begin
          st        <= P_CONV;
          conv_go   <= 1'b1;
          irq_start <= 1'b1;
        end
        P_CONV: if (conv_done) begin
          st      <= P_HIST;
          hist_go <= 1'b1;
          irq_seg <= 1'b1;
        end
        P_HIST: if (hist_done) begin
          st     <= P_PSO;
          pso_go <= 1'b1;
        end
        P_PSO: if (pso_done) begin
          st     <= P_BIN;
          bin_go <= 1'b1;
        end
        P_BIN: if (bin_done) begin
          st      <= P_IDLE;
          irq_end <= 1'b1;
        end
        default: st <= P_IDLE;
      endcase
    end
  end

  assign busy  = (st != P_IDLE);
  assign phase = st;

endmodule
