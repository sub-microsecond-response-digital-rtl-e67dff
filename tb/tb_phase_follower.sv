// tb_phase_follower: a first-phase PWM of on-time u (0 .. u-1) is applied for
// four terms per u; from the third term on the follower with offset 102
// must be high exactly for counts 102 .. 102+u-1 and the one with offset 408
// for counts 408 .. 408+u-1 modulo 512 (wrapping into the next term).
// D-ff I must hold u. When the on-time shrinks below the time a wrapped
// pulse has already run, that pulse must end at once. u = 204 is the document's example (falling edge at 306).
module tb_phase_follower;
  import pol_pkg::*;
  logic clk = 0, rst_n = 0, te, pwm_in, o1, o4;
  cnt_t cnt, u, ton1, ton4;
  int checks = 0, failures = 0;

  up_counter u_c (.clk, .rst_n, .cnt, .term_end(te));
  phase_follower #(.OFFSET(102)) dut1 (.clk, .rst_n, .cnt, .pwm_in, .pwm_out(o1), .ton(ton1));
  phase_follower #(.OFFSET(408)) dut4 (.clk, .rst_n, .cnt, .pwm_in, .pwm_out(o4), .ton(ton4));

  assign pwm_in = (cnt < u);

  always #1 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit inwin(int c, int off, int w);
    int d = c - off;
    if (d < 0) d += 512;
    return d < w;
  endfunction

  int uu[6] = '{204, 50, 300, 500, 1, 120};

  initial begin
    int on1;
    u = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    while (!te) @(negedge clk);
    foreach (uu[j]) begin
      u = cnt_t'(uu[j]);
      for (int k = 0; k < 4; k++) begin
        on1 = 0;
        do begin
          @(negedge clk);
          if (o1) on1++;
          // u drops from 500 to 1 while phase 5's pulse still runs (it
          // wraps from 408 to 396): it must end at once, not at 409
          if (uu[j] == 1 && k == 0 && int'(cnt) inside {[10:400]}) begin
            checks++;
            if (o4) begin failures++; $display("FAIL o4 still on at %0d after the on-time shrank", cnt); end
          end
          if (k >= 2) begin
            checks += 2;
            if (o1 != inwin(int'(cnt), 102, uu[j])) begin failures++; $display("FAIL o1 u=%0d cnt=%0d", uu[j], cnt); end
            if (o4 != inwin(int'(cnt), 408, uu[j])) begin failures++; $display("FAIL o4 u=%0d cnt=%0d", uu[j], cnt); end
          end
        end while (!te);
        if (k >= 2) begin
          checks += 2;
          if (int'(ton1) != uu[j] || int'(ton4) != uu[j]) begin failures++; $display("FAIL ton %0d", ton1); end
          if (on1 != uu[j]) begin failures++; $display("FAIL on-time %0d exp %0d", on1, uu[j]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
