// tdc_dll_cal: loop filter of the TDC delay-line ratio calibration (DLL).
//
// In the calibration phase the reference feeds both delay lines and the
// comparator at plane position (10,11) tells whether 10 stages of line X
// (tau1) are shorter than 11 stages of line Y (tau2).  The document forces
// 10*tau1 = 11*tau2 with an "IIR" filter (Fig. 3) that drives the tunable
// elements of line Y, and runs it on the falling edge of the clock so that it
// interleaves with acquisition.  Here the IIR is a bang-bang integrator: each
// falling edge adds -1 (comparator = 1: line X wins, line Y is too slow) or +1
// to an accumulator with FRAC extra bits; the calibration word is its integer
// part, saturated.  Filter order, step and widths are this design's choices.
// A larger word makes line Y slower.
`timescale 1ps/1fs
module tdc_dll_cal
  import adpll_pkg::*;
#(
  parameter int W    = TDC_GY_W,
  parameter int FRAC = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         cmp,       // comparator (10,11): 1 = 10*tau1 < 11*tau2
  output logic [W-1:0] cal_word
);

  localparam int AW = W + FRAC;
  localparam logic [AW-1:0] AMAX = {AW{1'b1}};
  logic [AW-1:0] acc;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= AW'(1) << (AW - 1);  // mid scale
    end else if (en) begin
      if (cmp) begin
        if (acc != '0) acc <= acc - AW'(1);
      end else begin
        if (acc != AMAX) acc <= acc + AW'(1);
      end
    end
  end

  assign cal_word = acc[AW-1:FRAC];

endmodule
