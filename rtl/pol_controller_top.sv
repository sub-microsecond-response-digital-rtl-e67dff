// pol_controller_top: five-phase digital POL controller.
//
// The single-phase PID look-up-table controller produces the first phase's
// PWM'. The overvoltage protection forces that phase off for a whole term
// when Eo is already above the top of the ramp at the start of the term. Each
// further phase is a phase follower that repeats the first phase's (protected)
// on-time, shifted by k * PHASE_STEP counts (102, 204, 306, 408 for five
// phases in a 512-count term). Only phase 1's sense path is used, as in the
// document's five-phase converter, where one ATC senses the common output.
// The document gives the follower logic and the constant 102 for the second
// phase; the multiples for phases 3..5, and applying the protection to
// phase 1 only (the followers copy its shortened pulse), are this design's
// choices.
//
// Interface: `vcomp` from the analog comparator; `dac_code` to the DAC;
// `pwm[0]` is phase 1, `pwm[k]` phase k+1, all registered and aligned with
// `cnt_o` (the up-counter delayed by one clock); `u_k` is the duty word;
// `ov_active` is the protection flip-flop. `wave_*` reload the DAC waveform
// table.
module pol_controller_top
  import pol_pkg::*;
#(
  parameter int unsigned NPHASE     = 5,
  parameter int unsigned PHASE_STEP = 102,
  parameter int unsigned PERIOD     = 512,
  parameter int unsigned DAC_W      = 9,
  parameter int          KP         = 10,
  parameter int          KI         = 0,
  parameter int          KD         = 0,
  parameter int          UREF       = 86,
  parameter int          R          = 40,
  parameter int          U_MAX      = 500,
  parameter int unsigned SAMPLE_CNT = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              vcomp,
  input  logic              wave_we,
  input  cnt_t              wave_waddr,
  input  logic [DAC_W-1:0]  wave_wdata,
  output logic [DAC_W-1:0]  dac_code,
  output logic [NPHASE-1:0] pwm,
  output cnt_t              cnt_o,
  output cnt_t              u_k,
  output logic              trig,
  output logic              ov_active
);

  initial assert (NPHASE >= 1 && (NPHASE - 1) * PHASE_STEP < PERIOD)
    else $error("pol_controller_top: phase offsets exceed the term");

  cnt_t cnt;
  logic pwm_raw, term_end, vcomp_s;

  dpwm_controller #(
    .PERIOD(PERIOD), .DAC_W(DAC_W), .KP(KP), .KI(KI), .KD(KD),
    .UREF(UREF), .R(R), .U_MAX(U_MAX)
  ) u_ctrl (
    .clk, .rst_n, .vcomp, .wave_we, .wave_waddr, .wave_wdata,
    .dac_code, .pwm(pwm_raw), .cnt, .u(u_k), .term_end, .trig, .vcomp_s
  );

  ov_protect #(.PERIOD(PERIOD), .SAMPLE_CNT(SAMPLE_CNT)) u_ovp (
    .clk, .rst_n, .cnt, .vcomp_s, .pwm_in(pwm_raw), .pwm_out(pwm[0]), .q(ov_active)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) cnt_o <= '0;
    else        cnt_o <= cnt;
  end

  for (genvar p = 1; p < int'(NPHASE); p++) begin : g_phase
    phase_follower #(.PERIOD(PERIOD), .OFFSET(p * PHASE_STEP)) u_follow (
      .clk, .rst_n, .cnt(cnt_o), .pwm_in(pwm[0]), .pwm_out(pwm[p]), .ton()
    );
  end

endmodule
