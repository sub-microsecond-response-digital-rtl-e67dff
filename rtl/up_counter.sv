// up_counter: the switching-term up-counter y1(k).
//
// One switching term lasts PERIOD cycles of the system clock fCLK. The counter
// runs 0, 1, ..., PERIOD-1 and wraps, so the term boundary is the cycle in which
// it holds PERIOD-1 (`term_end`, one cycle wide). Its 9-bit value addresses the
// waveform table, feeds the digital comparator, the PR generator and every
// block that works relative to the term. The 9-bit width and the 0..511 ramp
// follow the block diagram and the signal-flow figure; PERIOD is a parameter so
// that a 500-count term (500 MHz / 1 MHz) can also be chosen.
// Timing: synchronous active-low reset to 0, +1 per clock.
module up_counter
  import pol_pkg::*;
#(
  parameter int unsigned PERIOD = 512
) (
  input  logic clk,
  input  logic rst_n,
  output cnt_t cnt,
  output logic term_end
);

  initial assert (PERIOD >= 8 && PERIOD <= CNT_MAX + 1)
    else $error("up_counter: PERIOD out of range");

  assign term_end = (cnt == cnt_t'(PERIOD - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)        cnt <= '0;
    else if (term_end) cnt <= '0;
    else               cnt <= cnt + 1'b1;
  end

endmodule
