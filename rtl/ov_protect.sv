// ov_protect: overvoltage protection logic.
//
// If Eo is above the top of the ramp (Vref+), the comparator never crosses,
// no trigger occurs and u(k) would stay at its preset maximum. This block
// catches that case. A reset pulse at the last count of each term clears its
// D-ff; a sample pulse SAMPLE_CNT counts into the next term, once the ramp is
// at Vref+, loads the D-ff with the synchronised Vcomp. The selector then
// passes PWM when Q = 0 and ground when Q = 1, for the rest of the term. The
// sample count is this design's choice: it covers the DAC register and the
// two-flop synchroniser after the ramp restarts.
// Timing: `pwm_out` is registered, one cycle after `pwm_in`.
module ov_protect
  import pol_pkg::*;
#(
  parameter int unsigned PERIOD     = 512,
  parameter int unsigned SAMPLE_CNT = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  cnt_t cnt,
  input  logic vcomp_s,
  input  logic pwm_in,
  output logic pwm_out,
  output logic q
);

  logic sample, reset_p;

  assign sample  = (cnt == cnt_t'(SAMPLE_CNT));
  assign reset_p = (cnt == cnt_t'(PERIOD - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)       q <= 1'b0;
    else if (reset_p) q <= 1'b0;
    else if (sample)  q <= vcomp_s;
  end

  // Selector: Q = 0 -> PWM, Q = 1 -> Gnd.
  always_ff @(posedge clk) begin
    if (!rst_n) pwm_out <= 1'b0;
    else        pwm_out <= q ? 1'b0 : pwm_in;
  end

endmodule
