// duty_rom: memory 2, the P-parameter duty table.
//
// Holds the duty word u for every value of address' (eq. 10):
//     u = clamp( uref - (KP+KI) r + (KP+KI+KD) * address',  0, U_MAX )
// so that, the instant Eo is sensed, the complete PID result is already on the
// table output. The clamp produces the flat regions at both ends of the table
// (0 below, U_MAX above) around the linear region. The defaults KP=10, KI=0,
// KD=0 are the gains of the measured converter; uref=86, r=40 and U_MAX=500 are
// those of the document's example table (given there for KP=5).
// Timing: one-cycle registered read, read every clock.
module duty_rom
  import pol_pkg::*;
#(
  parameter int KP    = 10,
  parameter int KI    = 0,
  parameter int KD    = 0,
  parameter int UREF  = 86,
  parameter int R     = 40,
  parameter int U_MAX = 500
) (
  input  logic clk,
  input  cnt_t addr,
  output cnt_t u
);

  cnt_t mem [CNT_MAX + 1];

  initial begin
    for (int i = 0; i <= int'(CNT_MAX); i++)
      mem[i] = cnt_t'(duty_entry(i, KP, KI, KD, UREF, R, U_MAX));
  end

  always_ff @(posedge clk) u <= mem[addr];

endmodule
