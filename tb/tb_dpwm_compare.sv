// tb_dpwm_compare: exhaustive check of PWM' = (y1 < u) over a grid of counts
// and duty words, and the on-time per 512-count term for several duty words.
module tb_dpwm_compare;
  import pol_pkg::*;
  cnt_t cnt, u;
  logic pwm;
  int checks = 0, failures = 0;

  dpwm_compare dut (.cnt, .u, .pwm);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int on;
    for (int uu = 0; uu < 512; uu += 7) begin
      on = 0;
      for (int c = 0; c < 512; c++) begin
        cnt = cnt_t'(c); u = cnt_t'(uu);
        #1;
        if (pwm) on++;
        if (c % 13 == 0) begin
          checks++;
          if (pwm != (c < uu)) begin failures++; $display("FAIL c=%0d u=%0d", c, uu); end
        end
      end
      checks++;
      if (on != uu) begin failures++; $display("FAIL on-time %0d for u=%0d", on, uu); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
