// tb_pid_state_regs: fires trigger pulses with random nI and y1 values and
// checks that D-ff 1 and D-ff 3 capture on the trigger only and that D-ff 2
// takes D-ff 3's value one clock later.
module tb_pid_state_regs;
  import pol_pkg::*;
  logic clk = 0, rst_n = 0, trig = 0;
  scnt_t ni, ni_prev;
  cnt_t y1, y2, y2_prev;
  int checks = 0, failures = 0;
  int e_ni, e_y2, e_y2p;

  pid_state_regs dut (.clk, .rst_n, .trig, .ni, .y1, .ni_prev, .y2, .y2_prev);

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
    ni = 0; y1 = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    e_ni = 0; e_y2 = 0; e_y2p = 0;
    for (int k = 0; k < 200; k++) begin
      // several cycles of changing inputs without a trigger
      repeat (int'($urandom_range(2, 6))) begin
        @(negedge clk);
        ni = scnt_t'($urandom); y1 = cnt_t'($urandom);
        chk(int'(ni_prev) == e_ni && int'(y2) == e_y2 && int'(y2_prev) == e_y2p, "hold");
      end
      @(negedge clk);
      ni = scnt_t'($urandom); y1 = cnt_t'($urandom); trig = 1;
      e_ni = int'(ni); e_y2 = int'(y1);
      @(negedge clk);
      trig = 0;
      chk(int'(ni_prev) == e_ni, "D-ff1 capture");
      chk(int'(y2) == e_y2, "D-ff3 capture");
      chk(int'(y2_prev) == e_y2p, "D-ff2 not yet");
      @(negedge clk);
      e_y2p = e_y2;
      chk(int'(y2_prev) == e_y2p, "D-ff2 one clock later");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
