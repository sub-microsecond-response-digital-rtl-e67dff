// wave_rom: memory 1, the DAC waveform table.
//
// Addressed by the up-counter, it returns the DAC code of the reference ramp
// for that count. The table can hold any waveform; it is initialised to a
// step-down saw tooth that starts at full scale (Vref+) at count 0 and falls
// linearly to 0 at count DEPTH-1:  wave[i] = ((DEPTH-1-i) * (2^DAC_W - 1)) / (DEPTH-1).
// A write port lets a different waveform be loaded at run time (this port and
// its timing are this design's choice).
// Timing: one-cycle registered read, so the DAC code of count n appears in the
// cycle after the counter held n.
module wave_rom
  import pol_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned DAC_W = 9
) (
  input  logic             clk,
  input  cnt_t             addr,
  input  logic             we,
  input  cnt_t             waddr,
  input  logic [DAC_W-1:0] wdata,
  output logic [DAC_W-1:0] dac_code
);

  localparam int unsigned DAC_MAX = (1 << DAC_W) - 1;

  logic [DAC_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++)
      mem[i] = DAC_W'(((int'(DEPTH) - 1 - i) * int'(DAC_MAX)) / (int'(DEPTH) - 1));
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    dac_code <= mem[addr];
  end

endmodule
