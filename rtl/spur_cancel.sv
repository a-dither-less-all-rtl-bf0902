// spur_cancel: phase detector output with sigma-delta residue cancellation.
//
// The first-order sigma-delta modulator moves the divided edge by a saw-tooth
// of one DCO/2 period.  Its residue, scaled by the nominal ratio K0 between a
// DCO/2 period and a TDC LSB, is added to the gain-corrected TDC output so
// that only the true phase error reaches the loop filter (Fig. 1, Fig. 10):
//     e = Gd * (code - SETPOINT) + K0 * residue(k - DLY)
// Gd is the digital part of the TDC gain correction, K0 = 277.8 ps / 5 ps for
// a 3.6 GHz divider input and 5 ps LSB.  SETPOINT places the saw-tooth inside
// the 119-level range (this design's choice).  DLY aligns the residue with the
// TDC sample: the divider applies a ratio one divided cycle later and the TDC
// code is registered twice (decoder, linearity correction).
// Output: signed, FB fractional bits, combinational from registered inputs;
// `res_c` is the aligned residue centred on zero (for the gain correlator).
`timescale 1ps/1fs
module spur_cancel
  import adpll_pkg::*;
#(
  parameter int FB       = TDC_FB,
  parameter int RES_W    = FCW_FRAC_W,
  parameter int EW       = 16,
  parameter int K0_Q8    = 14222,   // 55.56 in Q8.8
  parameter int SETPOINT = 90,
  parameter int DLY      = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [TDC_W+FB:0]   code_corr,
  input  logic [RES_W-1:0]           residue,
  input  logic [17:0]                gd,        // Q2.14 digital gain
  output logic signed [EW-1:0]       e,
  output logic signed [RES_W:0]      res_c      // residue - 0.5, aligned
);

  logic [RES_W-1:0] dl [DLY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DLY; i++) dl[i] <= '0;
    end else begin
      dl[0] <= residue;
      for (int i = 1; i < DLY; i++) dl[i] <= dl[i-1];
    end
  end

  logic signed [TDC_W+FB+1:0] diff;
  logic signed [40:0]         g_term, k_term;

  always_comb begin
    diff   = (TDC_W+FB+2)'(code_corr) - (TDC_W+FB+2)'(SETPOINT << FB);
    g_term = (41'(diff) * $signed({1'b0, gd})) >>> 14;
    k_term = ($signed({1'b0, dl[DLY-1]}) * 41'(K0_Q8)) >>> (RES_W + 8 - FB);
    e      = EW'(g_term + k_term);
    res_c  = $signed({1'b0, dl[DLY-1]}) - $signed((RES_W+1)'(1 << (RES_W - 1)));
  end

endmodule
