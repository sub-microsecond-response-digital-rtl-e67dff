// gain_rom: memory 3 (I parameter) or memory 4 (D parameter).
//
// A 512-entry table that multiplies its 9-bit address by the constant ratio
// NUM/DEN and rounds to the nearest integer:
//     memory 3:  a = (KI/A) * nI(k-1)   address and data signed  (IN_SIGNED=1)
//     memory 4:  b = (KD/A) * y2(k-1)   address and data unsigned (IN_SIGNED=0)
// with A = KP + KI + KD. The table is filled at elaboration; its output is
// saturated to 9 bits of the chosen signedness.
// Timing: one-cycle registered read.
module gain_rom
  import pol_pkg::*;
#(
  parameter int NUM       = 0,
  parameter int DEN       = 10,
  parameter bit IN_SIGNED = 1'b1
) (
  input  logic     clk,
  input  cnt_t     addr,
  output cnt_t     data
);

  cnt_t mem [CNT_MAX + 1];

  function automatic int entry(int i);
    int x, v;
    x = (IN_SIGNED && i > int'(CNT_MAX >> 1)) ? i - int'(CNT_MAX + 1) : i;
    v = ratio_round(x, NUM, DEN);
    return IN_SIGNED ? sat_signed(v) : sat_addr(v);
  endfunction

  initial begin
    for (int i = 0; i <= int'(CNT_MAX); i++) mem[i] = cnt_t'(entry(i));
  end

  always_ff @(posedge clk) data <= mem[addr];

endmodule
