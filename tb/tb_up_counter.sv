// tb_up_counter: checks the term counter against a reference count for two
// full terms at the default 512-count term and at a 500-count term: the value
// every cycle, term_end exactly at the last count, and the term length.
module tb_up_counter;
  import pol_pkg::*;
  logic clk = 0, rst_n = 0;
  cnt_t cnt_a, cnt_b;
  logic te_a, te_b;
  int checks = 0, failures = 0;
  int ref_a, ref_b, last_end_a, ends_a;

  up_counter dut_a (.clk, .rst_n, .cnt(cnt_a), .term_end(te_a));
  up_counter #(.PERIOD(500)) dut_b (.clk, .rst_n, .cnt(cnt_b), .term_end(te_b));

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
    repeat (3) @(posedge clk);
    rst_n <= 1;
    ref_a = 0; ref_b = 0; ends_a = 0; last_end_a = -1;
    for (int t = 0; t < 1100; t++) begin
      @(negedge clk);
      chk(int'(cnt_a) == ref_a, $sformatf("cnt_a %0d exp %0d", cnt_a, ref_a));
      chk(int'(cnt_b) == ref_b, $sformatf("cnt_b %0d exp %0d", cnt_b, ref_b));
      chk(te_a == (ref_a == 511), "term_end a");
      chk(te_b == (ref_b == 499), "term_end b");
      if (te_a) begin
        if (last_end_a >= 0) chk(t - last_end_a == 512, "term length 512");
        last_end_a = t; ends_a++;
      end
      ref_a = (ref_a + 1) % 512;
      ref_b = (ref_b + 1) % 500;
    end
    chk(ends_a == 2, "two term ends seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
