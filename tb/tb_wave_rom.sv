// tb_wave_rom: reads all 512 entries of the waveform table and compares them
// with the step-down saw tooth 511 - i (9-bit DAC, 512 counts), checks the
// one-cycle read latency, then rewrites a few entries and reads them back.
module tb_wave_rom;
  import pol_pkg::*;
  logic clk = 0;
  cnt_t addr, waddr;
  logic we;
  logic [8:0] wdata, q;
  int checks = 0, failures = 0;

  wave_rom dut (.clk, .addr, .we, .waddr, .wdata, .dac_code(q));

  always #1 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; addr = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); addr = cnt_t'(i);
      @(negedge clk);
      chk(int'(q) == 511 - i, $sformatf("wave[%0d]=%0d", i, q));
    end
    // latency: address changes, output follows one edge later
    @(negedge clk); addr = 9'd10;
    @(negedge clk); addr = 9'd300;
    chk(int'(q) == 501, "first read");
    @(negedge clk);
    chk(int'(q) == 211, "second read");
    // reload a triangle segment
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); we = 1; waddr = cnt_t'(100 + i); wdata = 9'(i * 37);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); addr = cnt_t'(100 + i);
      @(negedge clk);
      chk(int'(q) == i * 37, $sformatf("rewritten[%0d]=%0d", 100 + i, q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
