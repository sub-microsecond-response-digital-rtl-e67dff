// tb_dpwm_controller: the single-phase controller against an ideal comparator
// and a reference model of the look-up-table PID law.
//
// Eo is given per term as a DAC code `eo`; the comparator output is
// (eo > dac_code). With the 511..0 ramp the ramp crosses Eo at count 513-eo,
// and the trigger follows two counts later, so the sensed count is
// y1(k) = 515 - eo. The model then computes, independently of the RTL tables,
//     u(k) = clamp(uref - (KP+KI) r + A (y1 + a - b), 0, 500)
//     nI(k) = nI(k-1) + y1 - r,  a = round(KI/A nI(k-1)),  b = round(KD/A y1(k-1))
// with KP=5, KI=2, KD=3 (A=10), uref=86, r=40, and checks: the DAC code every
// count, u = 511 until the latch and u(k) afterwards, PWM' every count, the
// on-time of each term, the Vcomp-to-u(k) latency (4 clocks = 8 ns at 500 MHz),
// and a term with Eo above the ramp, which must keep u at its preset maximum.
module tb_dpwm_controller;
  import pol_pkg::*;
  logic clk = 0, rst_n = 0, vcomp, pwm, te, trig, vs;
  logic [8:0] dac;
  cnt_t cnt, u;
  int eo;
  int checks = 0, failures = 0;
  int n_trig_terms = 0, n_notrig_terms = 0, n_sat_lo = 0, n_sat_hi = 0;

  dpwm_controller #(.KP(5), .KI(2), .KD(3)) dut (
    .clk, .rst_n, .vcomp, .wave_we(1'b0), .wave_waddr('0), .wave_wdata('0),
    .dac_code(dac), .pwm, .cnt, .u, .term_end(te), .trig, .vcomp_s(vs)
  );

  assign vcomp = (eo > int'(dac));

  always #1 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int rnd(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5 + 1.0e-9)) : -int'($floor(-v + 0.5 + 1.0e-9));
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  initial begin
    int ni, y2, ab, y1, ue, on, tl, first_rise, u_change;
    eo = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    while (!te) @(negedge clk);
    ni = 0; y2 = 0; ab = 0;
    for (int k = 0; k < 60; k++) begin
      if (k % 10 == 7) eo = 530;                      // above Vref+
      else if (k == 3) eo = 505;                      // crosses early: low duty
      else if (k == 4) eo = 420;                      // crosses late: high duty
      else eo = int'($urandom_range(455, 500));
      y1 = (eo <= 511) ? 515 - eo : -1;
      if (y1 > 508) y1 = -1;
      if (y1 >= 0) begin
        ue = clampi(86 - 7 * 40 + 10 * clampi(y1 + ab, 0, 511), 0, 500);
        if (ue == 0) n_sat_lo++;
        if (ue == 500) n_sat_hi++;
      end else ue = 511;
      on = 0; first_rise = -1; u_change = -1;
      do begin
        @(negedge clk);
        chk(int'(dac) == 511 - ((int'(cnt) + 511) % 512), "DAC ramp");
        chk(pwm == (cnt < u), "PWM' = y1 < u");
        if (pwm) on++;
        if (vcomp && first_rise < 0 && int'(cnt) >= 2) first_rise = int'(cnt);
        if (y1 >= 0 && int'(cnt) < y1 + 2) chk(int'(u) == 511, $sformatf("preset before latch cnt %0d u %0d", cnt, u));
        if (y1 >= 0 && int'(cnt) >= y1 + 2) begin
          if (u_change < 0) u_change = int'(cnt);
          chk(int'(u) == ue, $sformatf("term %0d eo %0d u=%0d exp %0d", k, eo, u, ue));
        end
        if (y1 < 0) chk(int'(u) == 511 && !trig, "no trigger: u preset");
      end while (!te);
      if (y1 >= 0) begin
        n_trig_terms++;
        tl = y1 + 2;
        chk(on == ((ue >= tl) ? ue : tl), $sformatf("on-time %0d", on));
        chk(u_change - first_rise == 4, $sformatf("latency %0d", u_change - first_rise));
        ni = sat_signed(ni + y1 - 40);
        y2 = y1;
      end else begin
        n_notrig_terms++;
        chk(on == 511, "full on-time without trigger");
      end
      ab = rnd(2.0 * ni / 10.0) - rnd(3.0 * y2 / 10.0);
    end
    chk(n_trig_terms > 40 && n_notrig_terms >= 5, "both term kinds");
    chk(n_sat_lo > 0 && n_sat_hi > 0, "both table limits reached");
    $display("terms with trigger %0d, without %0d, duty at 0: %0d, at max: %0d",
             n_trig_terms, n_notrig_terms, n_sat_lo, n_sat_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
