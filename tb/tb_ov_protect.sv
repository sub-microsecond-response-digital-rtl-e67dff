// tb_ov_protect: runs terms with a PWM of fixed duty and a synchronised Vcomp
// that is either high at the start of the term (Eo above Vref+) or low. In a
// protected term the output may only show the short pulse before the sample
// (counts 0..4) and Q must be 1 until the reset pulse; in a normal term the
// output must equal the input PWM delayed by one clock.
module tb_ov_protect;
  import pol_pkg::*;
  logic clk = 0, rst_n = 0, te, vs, pwm_in, pwm_out, q;
  cnt_t cnt;
  int checks = 0, failures = 0;
  int prot_terms = 0;

  up_counter u_c (.clk, .rst_n, .cnt, .term_end(te));
  ov_protect dut (.clk, .rst_n, .cnt, .vcomp_s(vs), .pwm_in, .pwm_out, .q);

  assign pwm_in = (cnt < 9'd200);

  always #1 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    bit over;
    int on, prev_in;
    vs = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    while (!te) @(negedge clk);
    for (int k = 0; k < 12; k++) begin
      over = (k % 3 == 1);
      on = 0; prev_in = 1;
      do begin
        @(negedge clk);
        // comparator: high while the ramp is below Eo
        vs = over ? 1'b1 : (int'(cnt) >= 2 && int'(cnt) < 100) ? 1'b0 : 1'b1;
        if (pwm_out) on++;
        if (over && int'(cnt) >= 6) chk(q == 1'b1, "Q set in protected term");
        if (!over) chk(q == 1'b0, "Q clear in normal term");
        if (!over && int'(cnt) >= 1) chk(pwm_out == (int'(cnt) - 1 < 200), "pass-through");
        if (over && int'(cnt) >= 6) chk(pwm_out == 1'b0, "forced to ground");
      end while (!te);
      if (over) begin
        prot_terms++;
        chk(on == 5, $sformatf("pulse before sample %0d exp 5", on));
      end
    end
    chk(prot_terms == 4, "protected terms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
