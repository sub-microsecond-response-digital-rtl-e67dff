// dpwm_controller: the single-phase hardware-logic PID DPWM controller.
//
// All blocks run in parallel on the system clock fCLK. The up-counter y1
// addresses memory 1, whose saw-tooth code drives the external DAC; the
// external comparator compares the converter output Eo with that ramp and its
// output Vcomp rises at the count where the ramp falls below Eo. That count is
// the digitised output voltage. Meanwhile the programmable counter runs
// address' = y1 + a - b, and memory 2 is read every clock, so the complete PID
// duty word for the current count is always waiting. When Vcomp rises, the
// trigger latches nI(k) (D-ff 1), y2(k) (D-ff 3) and, one clock later, memory
// 2's word into D-ff 4 as u(k). The digital comparator turns u(k) into PWM'
// within the same term. During the rest of the term memories 3 and 4 turn the
// latched nI and y2 into a and b, and at the term boundary a - b is loaded
// into the programmable counter while the PR generator presets u to maximum.
//
// Interface: `vcomp` is the comparator output (asynchronous), `dac_code` goes
// to the DAC, `pwm` is PWM' (combinational from registered state), `cnt` is
// y1, `u` is u(k). Latency from the Vcomp edge to the new u(k): 4 fCLK cycles
// (two synchroniser flops, edge detection, memory 2 read), 8 ns at 500 MHz.
// The fixed DAC/synchroniser delay shifts the sampled count by a constant,
// which is absorbed in the calibration of r.
module dpwm_controller
  import pol_pkg::*;
#(
  parameter int unsigned PERIOD = 512,
  parameter int unsigned DAC_W  = 9,
  parameter int          KP     = 10,
  parameter int          KI     = 0,
  parameter int          KD     = 0,
  parameter int          UREF   = 86,
  parameter int          R      = 40,
  parameter int          U_MAX  = 500
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             vcomp,
  input  logic             wave_we,
  input  cnt_t             wave_waddr,
  input  logic [DAC_W-1:0] wave_wdata,
  output logic [DAC_W-1:0] dac_code,
  output logic             pwm,
  output cnt_t             cnt,
  output cnt_t             u,
  output logic             term_end,
  output logic             trig,
  output logic             vcomp_s
);

  localparam int A = KP + KI + KD;

  initial assert (A > 0) else $error("dpwm_controller: KP+KI+KD must be positive");

  scnt_t ni, ni_prev;
  cnt_t  y2, y2_prev, a_raw, b, addr, mem2_u;
  logic  latch;

  up_counter #(.PERIOD(PERIOD)) u_cnt (
    .clk, .rst_n, .cnt, .term_end
  );

  wave_rom #(.DEPTH(CNT_MAX + 1), .DAC_W(DAC_W)) u_mem1 (
    .clk, .addr(cnt), .we(wave_we), .waddr(wave_waddr), .wdata(wave_wdata),
    .dac_code
  );

  vcomp_trigger #(.PERIOD(PERIOD)) u_trig (
    .clk, .rst_n, .vcomp, .cnt, .term_end, .vcomp_s, .trig
  );

  ni_generator #(.R(R)) u_nigen (
    .y1(cnt), .ni_prev, .ni
  );

  pid_state_regs u_regs (
    .clk, .rst_n, .trig, .ni, .y1(cnt), .ni_prev, .y2, .y2_prev
  );

  gain_rom #(.NUM(KI), .DEN(A), .IN_SIGNED(1'b1)) u_mem3 (
    .clk, .addr(cnt_t'(ni_prev)), .data(a_raw)
  );

  gain_rom #(.NUM(KD), .DEN(A), .IN_SIGNED(1'b0)) u_mem4 (
    .clk, .addr(y2_prev), .data(b)
  );

  addr_counter u_addr (
    .clk, .rst_n, .term_end, .a(scnt_t'(a_raw)), .b, .addr
  );

  duty_rom #(.KP(KP), .KI(KI), .KD(KD), .UREF(UREF), .R(R), .U_MAX(U_MAX)) u_mem2 (
    .clk, .addr, .u(mem2_u)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) latch <= 1'b0;
    else        latch <= trig;
  end

  duty_latch #(.PERIOD(PERIOD)) u_dff4 (
    .clk, .rst_n, .cnt, .latch, .din(mem2_u), .u
  );

  dpwm_compare u_cmp (
    .cnt, .u, .pwm
  );

endmodule
