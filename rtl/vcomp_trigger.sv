// vcomp_trigger: turns the analog comparator output Vcomp into the latch signal.
//
// Vcomp rises when the falling DAC ramp crosses below the sensed output Eo.
// It is asynchronous to fCLK, so it passes a two-flop synchroniser; the first
// rising edge of the synchronised level inside a term gives `trig`, a one-cycle
// pulse that latches nI(k), y2(k) and, one cycle later, u(k). Only one trigger
// per term is accepted (re-armed at the term boundary), none in the first
// three counts (an edge seen there still belongs to the previous ramp, since
// the restarted ramp reaches the comparator and the synchroniser only then)
// and none in the last three counts, so that the pre-calculation for the next
// term can settle. The synchroniser, the one-trigger rule and the window are this
// design's choices; the document only says the comparator output is read out
// as the latch signal of each D-ff.
// Timing: trig is high in the cycle after the synchroniser output rises, i.e.
// three fCLK edges after Vcomp rises. `vcomp_s` is the synchronised level.
module vcomp_trigger
  import pol_pkg::*;
#(
  parameter int unsigned PERIOD = 512
) (
  input  logic clk,
  input  logic rst_n,
  input  logic vcomp,
  input  cnt_t cnt,
  input  logic term_end,
  output logic vcomp_s,
  output logic trig
);

  logic s1, s2, s2_d, armed;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1 <= 1'b0; s2 <= 1'b0; s2_d <= 1'b0;
    end else begin
      s1 <= vcomp; s2 <= s1; s2_d <= s2;
    end
  end

  assign vcomp_s = s2;
  assign trig = s2 && !s2_d && armed &&
                (cnt >= cnt_t'(3)) && (cnt <= cnt_t'(PERIOD - 4));

  always_ff @(posedge clk) begin
    if (!rst_n)        armed <= 1'b1;
    else if (term_end) armed <= 1'b1;
    else if (trig)     armed <= 1'b0;
  end

endmodule
