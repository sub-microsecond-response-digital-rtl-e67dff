// tb_duty_latch: checks the reset and end-of-term preset to 511, capture on
// the latch pulse only, and that the preset wins over a latch at the last count.
module tb_duty_latch;
  import pol_pkg::*;
  logic clk = 0, rst_n = 0, latch = 0, te;
  cnt_t cnt, din, u;
  int checks = 0, failures = 0;
  int eu;

  up_counter u_c (.clk, .rst_n, .cnt, .term_end(te));
  duty_latch dut (.clk, .rst_n, .cnt, .latch, .din, .u);

  always #1 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat_at;
    din = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    eu = 511;
    for (int k = 0; k < 30; k++) begin
      lat_at = (k == 5) ? 511 : int'($urandom_range(3, 505));
      if (k == 7) lat_at = 1000;            // no latch in this term
      do begin
        @(negedge clk);
        checks++;
        if (int'(u) != eu) begin failures++; $display("FAIL term %0d cnt %0d u=%0d exp %0d", k, cnt, u, eu); end
        latch = (int'(cnt) == lat_at);
        din = cnt_t'($urandom);
        if (te) eu = 511;
        else if (latch) eu = int'(din);
      end while (!te);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
