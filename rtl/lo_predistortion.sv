// lo_predistortion: second-order predistortion of the direct modulation path.
//
// In two-point modulation the frequency deviation m (FCW units, Q.16) is fed
// both to the sigma-delta modulator and, through this block, directly to the
// DCO fine word.  The DCO fine characteristic is not linear, so the word
// offset is d = a1*m + a2*m^2 (the document selects a second-order polynomial).
// a1 is Q.16 (fine LSB per FCW LSB), a2 is Q.32 (fine LSB per FCW LSB^2), as
// produced by dco_cal.  Output: signed fine-word offset, rounded toward minus
// infinity, saturated to DW bits, registered (one cycle).
`timescale 1ps/1fs
module lo_predistortion
  import adpll_pkg::*;
#(
  parameter int MW = 16,  // modulation word width (signed, FCW fractional LSBs)
  parameter int CW = 24,  // coefficient width
  parameter int DW = 14   // output width (signed fine LSBs)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [MW-1:0] m,
  input  logic signed [CW-1:0] a1,   // Q.16
  input  logic signed [CW-1:0] a2,   // Q.32
  output logic signed [DW-1:0] d
);

  logic signed [2*MW-1:0]     m2;
  logic signed [MW+CW-1:0]    t1;
  logic signed [2*MW+CW-1:0]  t2;
  logic signed [2*MW+CW-1:0]  sum, q;
  logic signed [DW-1:0]       sat;

  always_comb begin
    m2  = m * m;
    t1  = m * a1;
    t2  = m2 * a2;
    sum = ((2*MW+CW)'(t1) <<< 16) + t2;
    q   = sum >>> 32;
    // saturate to the output range
    if (q > (2*MW+CW)'((1 << (DW - 1)) - 1))  sat = DW'((1 << (DW - 1)) - 1);
    else if (q < -(2*MW+CW)'(1 << (DW - 1)))  sat = DW'(-(1 << (DW - 1)));
    else                                       sat = DW'(q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  d <= '0;
    else if (en) d <= sat;
    else         d <= '0;
  end

endmodule
