// tb_vcomp_trigger: drives a counter and a comparator level that rises at a
// chosen count in each term and checks that exactly one trigger appears, two
// counts after the rising edge is applied, that a second edge in the same term
// is ignored, that an edge in the last counts of a term is ignored, and that a
// term without an edge gives no trigger. Then 60 random terms with a short
// glitch and a second edge are compared cycle by cycle with a reference model.
module tb_vcomp_trigger;
  import pol_pkg::*;
  logic clk = 0, rst_n = 0, vcomp = 0, te, trig, vs;
  cnt_t cnt;
  int checks = 0, failures = 0;
  bit hd = 1'b1;

  up_counter u_c (.clk, .rst_n, .cnt, .term_end(te));
  vcomp_trigger dut (.clk, .rst_n, .vcomp, .cnt, .term_end(te), .vcomp_s(vs), .trig);

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

  // one term: vcomp low from count 2, high at rise1 (and again at rise2 after a dip)
  task automatic run_term(int rise1, int rise2, int exp_cnt);
    int ntrig, tcnt;
    ntrig = 0; tcnt = -1;
    do begin
      @(negedge clk);
      if (trig) begin ntrig++; tcnt = int'(cnt); end
      if (int'(cnt) == 2) vcomp = 0;
      if (int'(cnt) == rise1) vcomp = 1;
      if (rise2 >= 0 && int'(cnt) == rise2 - 10) vcomp = 0;
      if (rise2 >= 0 && int'(cnt) == rise2) vcomp = 1;
    end while (!te);
    if (exp_cnt < 0) chk(ntrig == 0, $sformatf("no trigger expected, got %0d", ntrig));
    else begin
      chk(ntrig == 1, $sformatf("one trigger expected, got %0d", ntrig));
      chk(tcnt == exp_cnt, $sformatf("trigger at %0d exp %0d", tcnt, exp_cnt));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    while (!te) @(negedge clk);
    run_term(100, -1, 102);
    run_term(37, 300, 39);
    run_term(510, -1, -1);     // too late in the term
    run_term(600, -1, -1);     // never rises
    run_term(250, -1, 252);
    chk(vs == 1'b1, "synchronised level high");
    // random terms: the level rises at a random count, with a random dip
    // later; every cycle trig must equal the reference (first edge of the
    // level delayed by two clocks, counts 3..508 only) and vcomp_s the level
    // two clocks earlier
    for (int k = 0; k < 60; k++) begin
      int r1, r2;
      bit h1, h2, seen;
      r1 = int'($urandom_range(2, 530));
      r2 = int'($urandom_range(r1 + 5, r1 + 200));
      seen = 0; h1 = vcomp; h2 = vcomp;
      do begin
        @(negedge clk);
        chk(vs == h2, "vcomp_s is the level two clocks back");
        chk(trig == (!seen && h2 && !hd && int'(cnt) >= 3 && int'(cnt) <= 508),
            $sformatf("random term %0d cnt %0d trig %0b", k, cnt, trig));
        if (trig) seen = 1;
        hd = h2; h2 = h1;
        if (int'(cnt) == 2) vcomp = 0;
        if (int'(cnt) == r1) vcomp = 1;
        if (int'(cnt) == r1 + 3) vcomp = 0;
        if (int'(cnt) == r2) vcomp = 1;
        h1 = vcomp;
      end while (!te);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
