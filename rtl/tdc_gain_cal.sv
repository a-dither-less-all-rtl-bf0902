// tdc_gain_cal: zero-forcing background calibration of the TDC gain.
//
// The phase error after residue cancellation, e, is multiplied by the
// (zero-mean) sigma-delta residue and integrated (k_i*z/(z-1), Fig. 10).  When
// the TDC gain is right the residue has been cancelled and the product has zero
// mean; otherwise the integrator moves the gain correction Gc until it has.
// Gc is unsigned Q2.14 (1.0 = 16384), KI is a right shift (this design's
// choice of gain and format).
//
// The TDC gain can be moved in analog steps of STEP (about 1.6 %, the
// document's figure for the line-X tuning) and digitally in fine steps.  The
// merge used here: the analog word gx follows round((Gc-1)/STEP) with a
// hysteresis of 3/4 step, and the digital multiplier gd = Gc - gx*STEP makes up
// the rest.  Raising gx shortens line X and so raises the TDC gain.
// The loop must be stopped (en = 0) when the fractional spur falls inside
// the PLL bandwidth (Appendix of the document); it then holds its state.
`timescale 1ps/1fs
module tdc_gain_cal
  import adpll_pkg::*;
#(
  parameter int EW      = 16,
  parameter int RES_W   = FCW_FRAC_W,
  parameter int KI_SH   = 18,
  parameter int STEP_Q14 = 262,    // 0.016 in Q2.14
  parameter int GX_W    = TDC_GX_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [EW-1:0]    e,
  input  logic signed [RES_W:0]   res_c,
  output logic [17:0]             gc,      // total correction, Q2.14
  output logic [17:0]             gd,      // digital part, Q2.14
  output logic [GX_W-1:0]         gx_word  // analog line-X control, mid = 2^(GX_W-1)
);

  localparam int AXMAX = (1 << (GX_W - 1)) - 1;
  localparam int ACC_F = 12;               // extra integrator fraction bits

  logic signed [40:0]          prod;
  logic signed [18+ACC_F+1:0]  acc;        // Gc with ACC_F extra bits
  logic signed [GX_W:0]        ax;
  logic signed [19:0]          resid;      // Gc - 1 - ax*STEP

  assign prod = 41'(e) * 41'(res_c);

  always_comb begin
    resid = 20'(signed'({2'b00, gc})) - 20'sd16384 - 20'(ax) * 20'(STEP_Q14);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= (18+ACC_F+2)'(16384) <<< ACC_F;
      ax  <= '0;
    end else if (en) begin
      acc <= acc + (18+ACC_F+2)'(prod >>> (KI_SH - ACC_F));
      if (resid > 20'(STEP_Q14 * 3 / 4) && ax < (GX_W+1)'(AXMAX))
        ax <= ax + 1'b1;
      else if (resid < -20'(STEP_Q14 * 3 / 4) && ax > -(GX_W+1)'(AXMAX))
        ax <= ax - 1'b1;
    end
  end

  always_comb begin
    logic signed [18+ACC_F+1:0] g;
    g = acc >>> ACC_F;
    if (g < 0)               gc = '0;
    else if (g > 20'h3FFFF)  gc = 18'h3FFFF;
    else                     gc = 18'(g);
    gd      = 18'(20'(signed'({2'b00, gc})) - 20'(ax) * 20'(STEP_Q14));
    gx_word = GX_W'(ax + (GX_W+1)'(1 << (GX_W - 1)));
  end

endmodule
