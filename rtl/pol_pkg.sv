// pol_pkg: constants and look-up-table formulas shared by the POL controller.
//
// The controller is a hardware-logic digital PWM for a point-of-load buck
// converter. Every quantity is a count of the fast system clock fCLK inside one
// switching term: the up-counter value y1, the duty word u(k) and all table
// addresses are 9 bits wide (0..511), as printed on the block diagram.
//
// The table formulas below follow the look-up-table form of the PID law:
//   u(k)     = uref - (KP+KI) r + A * address'           A = KP + KI + KD
//   a        = (KI/A) * nI(k-1)                          (I-parameter table)
//   b        = (KD/A) * y2(k-1)                          (D-parameter table)
// The duty table is clamped to 0..U_MAX; with KP=5, KI=0, uref=86, r=40 it
// reproduces the example table (0 up to address 22, 1 at 23, +5 per address,
// 500 from address 123 on). Rounding a and b to the nearest integer is this
// design's choice, since the tables hold integers.
package pol_pkg;

  localparam int unsigned CNT_W = 9;            // counter / address / duty width
  localparam int unsigned CNT_MAX = (1 << CNT_W) - 1;

  typedef logic [CNT_W-1:0]        cnt_t;       // y1, address, u(k)
  typedef logic signed [CNT_W-1:0] scnt_t;      // nI, a, b (two's complement)

  // Duty table entry for table address `addr` (memory 2).
  function automatic int duty_entry(int addr, int kp, int ki, int kd,
                                    int uref, int r, int umax);
    int v;
    v = uref - (kp + ki) * r + (kp + ki + kd) * addr;
    if (v < 0) v = 0;
    if (v > umax) v = umax;
    return v;
  endfunction

  // round(x * num / den) to the nearest integer, halves away from zero.
  function automatic int ratio_round(int x, int num, int den);
    int p;
    p = x * num;
    if (den <= 0) return 0;
    if (p >= 0) return (2 * p + den) / (2 * den);
    return -((-2 * p + den) / (2 * den));
  endfunction

  // Saturate a signed value to the signed CNT_W range.
  function automatic int sat_signed(int v);
    int hi, lo;
    hi = (1 << (CNT_W - 1)) - 1;
    lo = -(1 << (CNT_W - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // Saturate to the unsigned table address range 0..CNT_MAX.
  function automatic int sat_addr(int v);
    if (v < 0) return 0;
    if (v > int'(CNT_MAX)) return int'(CNT_MAX);
    return v;
  endfunction

endpackage
