// duty_latch: D-ff 4 with the PR (preset) signal generator.
//
// D-ff 4 holds the duty word u(k) that the digital comparator uses. When the
// latch signal arrives it takes the value memory 2 is delivering; at the last
// count of the term the PR generator presets it to its maximum (all ones) so
// that the next term starts with the switch on until Eo is sensed. If no
// trigger comes, u stays at the maximum for the whole term. The preset wins
// over a simultaneous latch. `latch` is the trigger delayed by the one-cycle
// read of memory 2 (this design's timing).
// Timing: registered; reset to the preset value.
module duty_latch
  import pol_pkg::*;
#(
  parameter int unsigned PERIOD = 512
) (
  input  logic clk,
  input  logic rst_n,
  input  cnt_t cnt,
  input  logic latch,
  input  cnt_t din,
  output cnt_t u
);

  logic pr;

  assign pr = (cnt == cnt_t'(PERIOD - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)     u <= cnt_t'(CNT_MAX);
    else if (pr)    u <= cnt_t'(CNT_MAX);
    else if (latch) u <= din;
  end

endmodule
