// ni_generator: the nI signal generator of the integral path.
//
// It forms the integral factor of the current term from the value latched in
// the previous term and the current error e(k) = y1(k) - r:
//     nI(k) = nI(k-1) + y1(k) - r
// continuously, so that the latch signal can capture it in D-ff 1 at the
// instant Eo is sensed. The result saturates to the signed 9-bit range
// (-256..255), which is this design's choice for the 9-bit bus of the diagram.
// Timing: purely combinational.
module ni_generator
  import pol_pkg::*;
#(
  parameter int R = 40
) (
  input  cnt_t  y1,
  input  scnt_t ni_prev,
  output scnt_t ni
);

  int sum;
  always_comb begin
    sum = int'(ni_prev) + int'(y1) - R;
    ni  = scnt_t'(sat_signed(sum));
  end

endmodule
