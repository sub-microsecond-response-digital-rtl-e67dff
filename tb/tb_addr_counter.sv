// tb_addr_counter: runs terms with random a (signed) and b (unsigned) loaded
// at the term boundary and checks address' = sat(y1 + a - b) every count.
module tb_addr_counter;
  import pol_pkg::*;
  logic clk = 0, rst_n = 0, te;
  cnt_t cnt, b, addr;
  scnt_t a;
  int checks = 0, failures = 0;
  int ab;

  up_counter u_c (.clk, .rst_n, .cnt, .term_end(te));
  addr_counter dut (.clk, .rst_n, .term_end(te), .a, .b, .addr);

  always #1 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    a = 0; b = 0; ab = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 40; k++) begin
      // one term: the a-b presented from count 100 on is loaded at its end
      do begin
        @(negedge clk);
        if (int'(cnt) == 100) begin
          a = scnt_t'($urandom); b = cnt_t'($urandom_range(0, 300));
          if (k == 3) begin a = scnt_t'(-256); b = cnt_t'(511); end
          if (k == 4) begin a = scnt_t'(255);  b = 0; end
        end
        e = int'(cnt) + ab;
        if (e < 0) e = 0;
        if (e > 511) e = 511;
        checks++;
        if (int'(addr) != e) begin failures++; $display("FAIL cnt=%0d addr=%0d exp %0d", cnt, addr, e); end
      end while (!te);
      ab = int'(a) - int'(b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
