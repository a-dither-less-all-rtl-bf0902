// tdc_decoder: converts the thermometer code of the 2-D Vernier comparator
// matrix into a binary TDC code.
//
// The comparator matrix delivers one bit per quantization level, ordered by
// nominal threshold (level 0 = -45 ps ... level 118 = +545 ps for 5 ps LSB).
// Because the thresholds of a 2-D Vernier plane come from different tap pairs,
// mismatch can put the bits out of order ("bubbles").  The decoder therefore
// counts ones rather than searching for the 1->0 transition, which is the
// simplest bubble-tolerant conversion (this design's choice; the document only
// says the output is a thermometer code).  Registered output, one cycle of
// latency, plus saturation flags used by edge search.
`timescale 1ps/1fs
module tdc_decoder
  import adpll_pkg::*;
#(
  parameter int LEVELS = TDC_LEVELS,
  parameter int W      = TDC_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LEVELS-1:0] therm,     // 1 = reference edge led the signal edge
  output logic [W-1:0]      code,      // number of ones, 0..LEVELS
  output logic              sat_low,   // code == 0: divided edge leads
  output logic              sat_high   // code == LEVELS: divided edge lags
);

  logic [W-1:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < LEVELS; i++) ones = ones + W'(therm[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code     <= '0;
      sat_low  <= 1'b0;
      sat_high <= 1'b0;
    end else begin
      code     <= ones;
      sat_low  <= (ones == '0);
      sat_high <= (ones == W'(LEVELS));
    end
  end

endmodule
