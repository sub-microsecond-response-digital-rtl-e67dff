// tb_duty_rom: with KP=5, KI=0, uref=86, r=40 the table must equal the
// document's example table (the printed rows, and the linear law in between);
// with the default KP=10 and with a PID set (KP=5, KI=2, KD=3) every entry is
// compared with the clamped line of eq. (10) computed here.
module tb_duty_rom;
  import pol_pkg::*;
  logic clk = 0;
  cnt_t addr, q5, q10, qpid;
  int checks = 0, failures = 0;

  duty_rom #(.KP(5)) dut5 (.clk, .addr, .u(q5));
  duty_rom dut10 (.clk, .addr, .u(q10));
  duty_rom #(.KP(5), .KI(2), .KD(3)) dutpid (.clk, .addr, .u(qpid));

  always #1 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // printed rows of the example table
  int ta[14] = '{0, 1, 22, 23, 24, 25, 26, 119, 120, 121, 122, 123, 300, 511};
  int tu[14] = '{0, 0, 0,  1,  6,  11, 16, 481, 486, 491, 496, 500, 500, 500};

  function automatic int line(int x, int kp, int ki, int kd);
    int v = 86 - (kp + ki) * 40 + (kp + ki + kd) * x;
    return v < 0 ? 0 : (v > 500 ? 500 : v);
  endfunction

  task automatic rd(int i);
    @(negedge clk); addr = cnt_t'(i);
    @(negedge clk);
  endtask

  initial begin
    for (int j = 0; j < 14; j++) begin
      rd(ta[j]);
      checks++;
      if (int'(q5) != tu[j]) begin failures++; $display("FAIL table[%0d]=%0d exp %0d", ta[j], q5, tu[j]); end
    end
    for (int i = 0; i < 512; i++) begin
      rd(i);
      checks += 3;
      if (int'(q5) != line(i, 5, 0, 0)) begin failures++; $display("FAIL kp5[%0d]", i); end
      if (int'(q10) != line(i, 10, 0, 0)) begin failures++; $display("FAIL kp10[%0d]=%0d", i, q10); end
      if (int'(qpid) != line(i, 5, 2, 3)) begin failures++; $display("FAIL pid[%0d]=%0d", i, qpid); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
