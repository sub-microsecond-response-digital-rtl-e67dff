// tb_single_phase_loadstep: the single-phase converter of the reference
// design, closed loop: the top with NPHASE=1 and otherwise default parameters
// (KP=10, KI=KD=0, 512-count term at 500 MHz) on an averaged buck model with
// Ei = 12 V, L = 3.3 uH (10 mOhm), Co = 10 uF with ESR (30 mOhm) and an
// electronic load slewing at 50 A/us.
//
// 1. Static characteristic: for load currents 0.3, 0.5, 0.7 and 0.9 A the
//    average of Eo over 20 terms must be within 3 % of 1.5 V.
// 2. Load steps 0.3 A -> 0.9 A and 0.9 A -> 0.3 A: Eo must be back inside the
//    3 % band within 40 us; undershoot, overshoot and settling are printed.
// In every triggered term u(k) must follow the duty law for the sensed count.
module tb_single_phase_loadstep;
  import pol_pkg::*;
  logic clk = 0, rst_n = 0, vcomp, trig, ov;
  logic [8:0] dac;
  logic [0:0] pwm;
  cnt_t cnt_o, u_k;
  int checks = 0, failures = 0;

  pol_controller_top #(.NPHASE(1)) dut (
    .clk, .rst_n, .vcomp, .wave_we(1'b0), .wave_waddr('0), .wave_wdata('0),
    .dac_code(dac), .pwm, .cnt_o, .u_k, .trig, .ov_active(ov)
  );

  real il, vc, eo, io, io_target;
  localparam real DT = 2.0e-9, EI = 12.0, L = 3.3e-6, RL = 0.010;
  localparam real CO = 10.0e-6, ESR = 0.030, SLEW = 50.0e6;

  assign vcomp = (eo > (real'(dac) * 1.6 / 511.0));

  always #1 clk = ~clk;

  always @(posedge clk) begin
    il = il + DT * ((pwm[0] ? EI : 0.0) - eo - RL * il) / L;
    if (io < io_target) io = (io + SLEW * DT > io_target) ? io_target : io + SLEW * DT;
    if (io > io_target) io = (io - SLEW * DT < io_target) ? io_target : io - SLEW * DT;
    vc = vc + DT * (il - io) / CO;
    eo = vc + ESR * (il - io);
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

  // duty law for every latched word
  int cyc = 0, exp_at = -1, u_exp = 0, n_trig = 0;
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (trig) begin
      u_exp = 86 - 400 + 10 * ((int'(cnt_o) + 1) % 512);
      u_exp = u_exp < 0 ? 0 : (u_exp > 500 ? 500 : u_exp);
      exp_at = cyc + 2;
      n_trig++;
    end
    if (cyc == exp_at) chk(int'(u_k) == u_exp, $sformatf("u(k)=%0d exp %0d", u_k, u_exp));
  end

  function automatic bit within3(real v);
    return v > 1.5 * 0.97 && v < 1.5 * 1.03;
  endfunction

  task automatic static_point(real i_load);
    real sum;
    io_target = i_load;
    repeat (80 * 512) @(posedge clk);
    sum = 0.0;
    for (int i = 0; i < 20 * 512; i++) begin @(posedge clk); sum += eo; end
    sum = sum / (20.0 * 512.0);
    $display("static: Io %0.1f A -> Eo %0.4f V (%0.2f %%)", i_load, sum, (sum - 1.5) / 1.5 * 100.0);
    chk(within3(sum), $sformatf("static Eo %f at %f A", sum, i_load));
  endtask

  task automatic load_step(real to, string name);
    real lo, hi;
    int t0, last_out;
    lo = 10.0; hi = -10.0;
    io_target = to; t0 = cyc; last_out = cyc;
    for (int i = 0; i < 60 * 512; i++) begin
      @(negedge clk);
      if (eo < lo) lo = eo;
      if (eo > hi) hi = eo;
      if (!within3(eo)) last_out = cyc;
    end
    $display("%s: Eo min %0.3f V, max %0.3f V, last outside 3%% band %0.2f us after the step",
             name, lo, hi, (last_out - t0) * 2.0e-3);
    chk((last_out - t0) * 2.0e-3 < 40.0, $sformatf("%s settles within 40 us", name));
  endtask

  initial begin
    il = 0.3; vc = 1.5; eo = 1.5; io = 0.3; io_target = 0.3;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    static_point(0.3);
    static_point(0.5);
    static_point(0.7);
    static_point(0.9);
    io_target = 0.3;
    repeat (80 * 512) @(posedge clk);
    load_step(0.9, "0.3 A -> 0.9 A");
    load_step(0.3, "0.9 A -> 0.3 A");
    chk(n_trig > 400, "terms with a trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
