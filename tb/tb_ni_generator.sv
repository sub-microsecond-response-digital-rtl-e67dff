// tb_ni_generator: random and corner checks of nI(k) = sat(nI(k-1) + y1 - r).
module tb_ni_generator;
  import pol_pkg::*;
  cnt_t y1;
  scnt_t prev, ni;
  int checks = 0, failures = 0;

  ni_generator #(.R(40)) dut (.y1, .ni_prev(prev), .ni);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(int y, int p);
    int e;
    y1 = cnt_t'(y); prev = scnt_t'(p);
    #1;
    e = p + y - 40;
    if (e > 255) e = 255;
    if (e < -256) e = -256;
    checks++;
    if (int'(ni) != e) begin
      failures++; $display("FAIL y1=%0d prev=%0d ni=%0d exp %0d", y, p, ni, e);
    end
  endtask

  initial begin
    try(40, 0); try(0, 0); try(511, 255); try(0, -256); try(50, -10); try(300, 0);
    for (int i = 0; i < 2000; i++)
      try(int'($urandom_range(0, 511)), int'($urandom_range(0, 511)) - 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
