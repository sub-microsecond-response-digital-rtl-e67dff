// addr_counter: the programmable counter that produces address' for memory 2.
//
//     address' = y1(k) + a - b
// At the term boundary the counter is loaded with the pre-calculated a - b
// (a from memory 3, signed; b from memory 4, unsigned), the value that belongs
// to count 0 of the new term; afterwards it counts up with the system clock in
// step with the up-counter. The table address is saturated to 0..511, which
// gives the same duty as extending memory 2's constant end regions; the
// internal count is kept 11 bits wide so it never wraps.
// Timing: `addr` belongs to the same cycle as the up-counter value it extends.
module addr_counter
  import pol_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  term_end,
  input  scnt_t a,
  input  cnt_t  b,
  output cnt_t  addr
);

  logic signed [CNT_W+1:0] acc;   // y1 + a - b, range -767..766
  logic signed [CNT_W+1:0] init;  // a - b, value for count 0

  assign init = $signed((CNT_W+2)'(a)) - $signed({2'b00, b});

  always_ff @(posedge clk) begin
    if (!rst_n)        acc <= '0;
    else if (term_end) acc <= init;
    else               acc <= acc + 1'b1;
  end

  always_comb begin
    if (acc < 0)                           addr = '0;
    else if (acc > $signed((CNT_W+2)'(CNT_MAX))) addr = cnt_t'(CNT_MAX);
    else                                   addr = cnt_t'(acc);
  end

endmodule
