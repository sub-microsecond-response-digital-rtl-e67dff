// tb_gain_rom: checks every entry of an I-parameter table (signed, KI/A = 3/10)
// and a D-parameter table (unsigned, KD/A = 7/10) against values computed here
// with real arithmetic and rounding to nearest, and the one-cycle read.
module tb_gain_rom;
  import pol_pkg::*;
  logic clk = 0;
  cnt_t addr, qa, qb;
  int checks = 0, failures = 0;

  gain_rom #(.NUM(3), .DEN(10), .IN_SIGNED(1'b1)) dut_a (.clk, .addr, .data(qa));
  gain_rom #(.NUM(7), .DEN(10), .IN_SIGNED(1'b0)) dut_b (.clk, .addr, .data(qb));

  always #1 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5 + 1.0e-9)) : -int'($floor(-v + 0.5 + 1.0e-9));
  endfunction

  initial begin
    int xs, ea, eb;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); addr = cnt_t'(i);
      @(negedge clk);
      xs = (i >= 256) ? i - 512 : i;
      ea = rnd(xs * 0.3);
      eb = rnd(i * 0.7);
      if (eb > 511) eb = 511;
      checks += 2;
      if (int'(scnt_t'(qa)) != ea) begin failures++; $display("FAIL a[%0d]=%0d exp %0d", xs, $signed(qa), ea); end
      if (int'(qb) != eb) begin failures++; $display("FAIL b[%0d]=%0d exp %0d", i, qb, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
