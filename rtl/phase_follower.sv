// phase_follower: one follower phase of the multi-phase controller.
//
// It copies the on-time of the first phase and shifts it by OFFSET counts:
//   Start   : Timing pulse when the counter reaches OFFSET -> sets D-ff II.
//   D-ff I  : captures the counter at the falling edge of the first phase's
//             PWM, i.e. that phase's on-time.
//   Const   : OFFSET.   Adder: D-ff I + OFFSET (modulo PERIOD).
//   Phase   : goes to 0 when the counter reaches the Adder output -> clears D-ff II.
// So PWMn rises at count OFFSET and falls at count OFFSET + on-time. With
// five phases the document's constant for the second phase is 102 (one fifth
// of the 512-count term); the following phases use multiples of it.
// Departure from the document: "reaches" is tested as "the count elapsed since
// OFFSET is at least the on-time" instead of "counter equals Adder". The two
// agree except when a pulse that wraps past the term end (OFFSET + on-time >
// PERIOD) meets a first-phase on-time that has just become shorter than the
// time already elapsed: an equality test then misses its count and the phase
// stays on for almost a whole extra term; here it is cleared at once.
// `cnt` must be the counter value aligned with `pwm_in`. D-ff II is updated one
// count ahead so that its output is high exactly for the counts
// OFFSET .. OFFSET+on-time-1. A clear wins over a simultaneous set.
// Timing: registered output; D-ff I holds its value between edges.
module phase_follower
  import pol_pkg::*;
#(
  parameter int unsigned PERIOD = 512,
  parameter int unsigned OFFSET = 102
) (
  input  logic clk,
  input  logic rst_n,
  input  cnt_t cnt,
  input  logic pwm_in,
  output logic pwm_out,
  output cnt_t ton     // D-ff I
);

  logic pwm_prev;
  cnt_t cnt_next, adder, elapsed;
  logic timing, phase_n;
  int   sum, d;

  assign cnt_next = (cnt == cnt_t'(PERIOD - 1)) ? '0 : cnt + 1'b1;

  always_comb begin
    sum   = int'(ton) + int'(OFFSET);
    if (sum >= int'(PERIOD)) sum = sum - int'(PERIOD);
    adder = cnt_t'(sum);
    // counts from the Start point to the Adder output = on-time
    d = int'(cnt_next) - int'(OFFSET);
    if (d < 0) d = d + int'(PERIOD);
    elapsed = cnt_t'(d);
  end

  assign timing  = (cnt_next == cnt_t'(OFFSET));
  // Phase: 0 once the counter has reached the Adder output within this pulse
  assign phase_n = !(elapsed >= ton);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pwm_prev <= 1'b0;
      ton      <= '0;
      pwm_out  <= 1'b0;
    end else begin
      pwm_prev <= pwm_in;
      if (pwm_prev && !pwm_in) ton <= cnt;
      if (!phase_n)    pwm_out <= 1'b0;
      else if (timing) pwm_out <= 1'b1;
    end
  end

endmodule
