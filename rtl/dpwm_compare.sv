// dpwm_compare: the digital comparator that creates PWM'.
//
// PWM' is high from the start of the term while the up-counter is below the
// duty word u(k) and low from the count u(k) on, so the on-time is u(k) clock
// periods. Because u(k) may change in the middle of the term (when Eo is
// sensed), the sensed value acts on the same term.
// Timing: combinational.
module dpwm_compare
  import pol_pkg::*;
(
  input  cnt_t cnt,
  input  cnt_t u,
  output logic pwm
);

  assign pwm = (cnt < u);

endmodule
