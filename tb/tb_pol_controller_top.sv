// tb_pol_controller_top: closed-loop run of the five-phase controller at its
// default parameters (512-count term, KP=10, KI=KD=0, uref=86, r=40, offsets
// 102/204/306/408) against an averaged five-phase buck converter.
//
// Plant model (testbench only): Ei = 12 V, per phase L = 3.3 uH with 10 mOhm
// winding resistance, Co = 57 uF with 2 mOhm ESR, an electronic load stepping
// between 1.5 A and 4.5 A at 50 A/us, fCLK = 500 MHz (2 ns per step). The DAC
// maps code n to n/511 * 1.6 V (Vref+ = 1.6 V); the comparator is ideal.
//
// Run: start from the operating point (1.5 V, 1.5 A), 120 terms of steady
// state, a load step 1.5 A -> 4.5 A and back, an injected undervoltage (Eo
// forced to 1.2 V) and an injected overvoltage (Eo forced to 1.8 V), each
// followed by recovery.
// Checked: u(k) against the duty law for the sensed count in every triggered
// term; the sensed count against Eo; the phase-1 on-time against u(k); every
// follower's rising edge at its offset and its pulse width against phase 1's
// latest on-time; Eo within 3 % of 1.5 V in steady state, again within 55 us
// after each load step and after each injected disturbance; phase 1 forced
// off in protected terms. Each mechanism (triggered term, term without
// trigger, duty table clamped at 0 and at 500, protection, every follower
// phase) must occur at least once.
module tb_pol_controller_top;
  import pol_pkg::*;
  localparam int NP = 5;
  logic clk = 0, rst_n = 0, vcomp, trig, ov;
  logic [8:0] dac;
  logic [NP-1:0] pwm;
  cnt_t cnt_o, u_k;
  int checks = 0, failures = 0;

  pol_controller_top dut (
    .clk, .rst_n, .vcomp, .wave_we(1'b0), .wave_waddr('0), .wave_wdata('0),
    .dac_code(dac), .pwm, .cnt_o, .u_k, .trig, .ov_active(ov)
  );

  // ---------------- plant ----------------
  real il [NP];
  real vc, eo, io, io_target;
  localparam real DT = 2.0e-9, EI = 12.0, L = 3.3e-6, RL = 0.010;
  localparam real CO = 57.0e-6, ESR = 0.030, SLEW = 50.0e6;   // A/s

  assign vcomp = (eo > (real'(dac) * 1.6 / 511.0));

  always #1 clk = ~clk;

  always @(posedge clk) begin
    real isum;
    isum = 0.0;
    for (int p = 0; p < NP; p++) begin
      il[p] = il[p] + DT * ((pwm[p] ? EI : 0.0) - eo - RL * il[p]) / L;
      isum += il[p];
    end
    if (io < io_target) io = (io + SLEW * DT > io_target) ? io_target : io + SLEW * DT;
    if (io > io_target) io = (io - SLEW * DT < io_target) ? io_target : io - SLEW * DT;
    vc = vc + DT * (isum - io) / CO;
    eo = vc + ESR * (isum - io);
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- per-cycle checks and counters ----------------
  int term = 0, y1_trig = -1, u_exp = -1, exp_at = -1;
  int n_trig = 0, n_notrig = 0, n_clamp0 = 0, n_clamp500 = 0, n_prot = 0;
  int n_rise [NP];
  int rise_cyc [NP];
  int last_w0 = 0, prev_w0 = 0, n_follow_checked = 0, n_truncated = 0, fall0_cyc = 0;
  int on [NP];
  int on_prev [NP];
  bit trig_seen, prot_term;
  logic [NP-1:0] pwm_d;
  real eo_min, eo_max;
  int cyc = 0;

  always @(negedge clk) if (rst_n) begin
    cyc++;
    // followers first: a follower that falls in the same cycle as phase 1
    // still used the previous phase-1 on-time
    for (int p = NP - 1; p >= 0; p--) begin
      if (pwm[p]) on[p]++;
      if (pwm[p] && !pwm_d[p]) begin
        n_rise[p]++;
        rise_cyc[p] = cyc;
        chk(int'(cnt_o) == p * 102, $sformatf("phase %0d rises at %0d", p + 1, cnt_o));
      end
      if (!pwm[p] && pwm_d[p] && rise_cyc[p] > 0) begin
        if (p == 0) begin prev_w0 = last_w0; last_w0 = cyc - rise_cyc[0]; fall0_cyc = cyc; end
        else if (last_w0 > 0 && cyc - fall0_cyc <= 2 &&
                 (cyc - rise_cyc[p] > last_w0 || cyc - rise_cyc[p] == prev_w0)) begin
          // phase 1 fell just now: this pulse either ended on the previous
          // on-time or, the new on-time being shorter than the time it had
          // already run, was cut at once
          n_truncated++;
        end else if (last_w0 > 0) begin
          n_follow_checked++;
          chk(cyc - rise_cyc[p] == last_w0,
              $sformatf("phase %0d width %0d, phase-1 width %0d", p + 1, cyc - rise_cyc[p], last_w0));
        end
      end
    end
    pwm_d = pwm;
    if (eo < eo_min) eo_min = eo;
    if (eo > eo_max) eo_max = eo;
    if (trig) begin
      // trig belongs to the controller count, one ahead of cnt_o
      y1_trig = (int'(cnt_o) + 1) % 512;
      u_exp = 86 - 400 + 10 * y1_trig;
      if (u_exp < 0) begin u_exp = 0; n_clamp0++; end
      if (u_exp > 500) begin u_exp = 500; n_clamp500++; end
      exp_at = cyc + 2;
      trig_seen = 1;
      // sensed count against Eo: the ramp crossed Eo about 2 counts earlier
      chk((y1_trig - (515 - int'(eo * 511.0 / 1.6))) inside {[-3:3]},
          $sformatf("sensed count %0d for Eo %f", y1_trig, eo));
    end
    if (cyc == exp_at) chk(int'(u_k) == u_exp, $sformatf("u(k)=%0d exp %0d", u_k, u_exp));
    if (ov) prot_term = 1;
    if (prot_term && int'(cnt_o) >= 7) chk(pwm[0] == 1'b0, "phase 1 off while protected");
    // term boundary as seen at the outputs
    if (int'(cnt_o) == 511) begin
      if (trig_seen) n_trig++; else n_notrig++;
      if (prot_term) begin
        n_prot++;
        chk(on[0] <= 6, $sformatf("protected on-time %0d", on[0]));
      end else if (trig_seen) begin
        chk(on[0] == ((u_exp >= y1_trig + 2) ? u_exp : y1_trig + 2), $sformatf("phase-1 on-time %0d u %0d", on[0], u_exp));
      end
      for (int p = 0; p < NP; p++) begin on_prev[p] = on[p]; on[p] = 0; end
      trig_seen = 0; prot_term = 0; term++;
    end
  end

  // ---------------- scenario ----------------
  task automatic run_terms(int n);
    repeat (n * 512) @(posedge clk);
  endtask

  function automatic bit within3(real v);
    return v > 1.5 * 0.97 && v < 1.5 * 1.03;
  endfunction

  real eo_pre;
  int t_step, t_settle;

  task automatic load_step(real to, string name);
    real lo, hi;
    int last_out;
    eo_min = 10.0; eo_max = -10.0;
    io_target = to;
    t_step = cyc; last_out = cyc;
    for (int i = 0; i < 60 * 512; i++) begin
      @(negedge clk);
      if (!within3(eo)) last_out = cyc;
    end
    lo = eo_min; hi = eo_max;
    $display("%s: Eo min %0.3f V max %0.3f V, last outside 3%% band %0.2f us after the step",
             name, lo, hi, (last_out - t_step) * 2.0e-3);
    chk(within3(eo), $sformatf("%s: Eo %f settled", name, eo));
    chk((last_out - t_step) * 2.0e-3 < 55.0, $sformatf("%s settles within 55 us", name));
  endtask

  initial begin
    for (int p = 0; p < NP; p++) begin il[p] = 0.3; n_rise[p] = 0; rise_cyc[p] = 0; on[p] = 0; on_prev[p] = 0; end
    vc = 1.5; eo = 1.5; io = 1.5; io_target = 1.5;
    trig_seen = 0; prot_term = 0; pwm_d = '0;
    eo_min = 10.0; eo_max = -10.0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    io_target = 1.5;
    run_terms(100);
    $display("start-up done: Eo %0.4f V, u(k) %0d", eo, u_k);
    run_terms(20);
    chk(within3(eo), $sformatf("static Eo %f within 3%% of 1.5 V", eo));
    $display("steady state at 1.5 A: Eo %0.4f V, u(k) %0d", eo, u_k);
    load_step(4.5, "1.5 A -> 4.5 A");
    load_step(1.5, "4.5 A -> 1.5 A");
    // injected undervoltage: late crossing, duty table at its upper limit
    @(posedge clk iff int'(cnt_o) == 300);
    vc = 1.2;
    run_terms(40);
    chk(within3(eo), $sformatf("recovered Eo %f", eo));
    // injected overvoltage
    @(posedge clk iff int'(cnt_o) == 300);
    vc = 1.8;
    run_terms(40);
    chk(within3(eo), $sformatf("recovered Eo %f", eo));
    $display("mechanisms: triggered terms %0d, untriggered %0d, clamp0 %0d, clamp500 %0d, protected %0d",
             n_trig, n_notrig, n_clamp0, n_clamp500, n_prot);
    $display("follower pulses checked %0d, cut short %0d", n_follow_checked, n_truncated);
    $display("rising edges per phase: %0d %0d %0d %0d %0d", n_rise[0], n_rise[1], n_rise[2], n_rise[3], n_rise[4]);
    chk(n_trig > 0, "trigger happened");
    chk(n_notrig > 0, "term without trigger happened");
    chk(n_clamp0 > 0, "duty table clamp at 0 happened");
    chk(n_clamp500 > 0, "duty table clamp at 500 happened");
    chk(n_prot > 0, "overvoltage protection happened");
    chk(n_follow_checked > 400, "follower widths checked");
    for (int p = 1; p < NP; p++) chk(n_rise[p] > 100, $sformatf("phase %0d active", p + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
