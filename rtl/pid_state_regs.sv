// pid_state_regs: D-ff 1, D-ff 3 and D-ff 2 of the PID look-up-table path.
//
// On the latch signal `trig` (Eo sensed in term k):
//   D-ff 1 captures nI(k)  -> holds nI(k-1) for the next term's memory 3,
//   D-ff 3 captures y1(k)  -> y2(k) = y1(k).
// D-ff 2 copies D-ff 3 one clock after the trigger, so it holds y2(k-1) for
// memory 4 while D-ff 3 is free to be overwritten in the next term. The chain
// D-ff 3 -> D-ff 2 and the capture on the latch signal follow the block
// diagram; the one-clock offset of D-ff 2 is this design's choice.
// Timing: all registers reset to 0; outputs change one clock after the event.
module pid_state_regs
  import pol_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  trig,
  input  scnt_t ni,
  input  cnt_t  y1,
  output scnt_t ni_prev,   // D-ff 1
  output cnt_t  y2,        // D-ff 3
  output cnt_t  y2_prev    // D-ff 2
);

  logic trig_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ni_prev <= '0;
      y2      <= '0;
      y2_prev <= '0;
      trig_d  <= 1'b0;
    end else begin
      trig_d <= trig;
      if (trig) begin
        ni_prev <= ni;
        y2      <= y1;
      end
      if (trig_d) y2_prev <= y2;
    end
  end

endmodule
