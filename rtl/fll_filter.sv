// fll_filter: frequency-locked loop driven by the RF counter.
//
// Each reference cycle the RF counter reports how many carrier edges (DCO/4)
// occurred; the expected number is FCW/2 (the FCW counts DCO/2 cycles).  The
// frequency error is accumulated (an integrator, the document's "simple
// integrator" that keeps the FLL unconditionally stable) and the DCO fine word
// is the preset minus KF times that sum.  Because the accumulated frequency
// error is a phase, the fine word settles where the average frequency is
// exact, with a ripple set by the one-edge resolution of the counter.
// `locked` rises when the accumulated error changed by at most one carrier
// cycle over the last 2^WIN_LOG2 cycles, after at least MIN_CYC cycles; this
// is the "frequency error inside the TDC acquisition range" condition, and
// its form is this design's choice.  Gain, window and widths are assumed.
`timescale 1ps/1fs
module fll_filter
  import adpll_pkg::*;
#(
  parameter int CW       = 12,
  parameter int KF_SH    = 8,
  parameter int WIN_LOG2 = 5,
  parameter int MIN_CYC  = 128,
  parameter int OW       = FINE_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              clr,
  input  logic [FCW_W-1:0]  fcw,
  input  logic [CW-1:0]     count,
  input  logic              count_valid,
  output logic [OW-1:0]     word,
  output logic              locked
);

  localparam int PF = FCW_FRAC_W + 1;  // fraction bits of FCW/2
  logic signed [39:0] ferr, phase, phase_hist, w;
  logic [WIN_LOG2-1:0] wcnt;
  logic [9:0]          ncyc;

  assign ferr = (40'(count) <<< PF) - 40'(fcw);

  always_comb begin
    w = (40'(1 << (OW - 1))) - (phase >>> (PF - KF_SH));
    if (w < 0)                 word = '0;
    else if (w > (1 << OW) - 1) word = '1;
    else                       word = OW'(w);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= '0;
      phase_hist <= '0;
      wcnt       <= '0;
      ncyc       <= '0;
      locked     <= 1'b0;
    end else if (clr) begin
      phase      <= '0;
      phase_hist <= '0;
      wcnt       <= '0;
      ncyc       <= '0;
      locked     <= 1'b0;
    end else if (en && count_valid) begin
      phase <= phase + ferr;
      wcnt  <= wcnt + 1'b1;
      if (ncyc != '1) ncyc <= ncyc + 1'b1;
      if (wcnt == '0) begin
        phase_hist <= phase;
        locked <= (int'(ncyc) >= MIN_CYC) &&
                  ((phase - phase_hist) <= (40'sd1 <<< PF)) &&
                  ((phase - phase_hist) >= -(40'sd1 <<< PF));
      end
    end
  end

endmodule
