// sd_modulator: first-order sigma-delta modulator of the fractional-N divider.
//
// Each reference cycle the fractional part of the frequency control word is
// added to an accumulator; the carry selects N+1 instead of N for the
// multi-modulus divider.  The accumulator content (the sigma-delta residue,
// unsigned Q0.FRAC_W) is the phase error the divider will cause and feeds the
// spur cancellation path and the TDC gain correlator.  First order and
// residue output follow the document; widths are this design's choice.
// An edge-search offset (-1/0/+1) is added to the integer ratio (Fig. 8).
// Timing: ratio and residue are registered, updated every reference cycle when
// enabled; the residue of cycle k is the value held after edge k.
`timescale 1ps/1fs
module sd_modulator
  import adpll_pkg::*;
#(
  parameter int INT_W  = FCW_INT_W,
  parameter int FRAC_W = FCW_FRAC_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [INT_W+FRAC_W-1:0] fcw,      // Q(INT_W).(FRAC_W)
  input  logic signed [1:0]       es_adj,   // edge-search ratio adjustment
  output logic [INT_W-1:0]        ratio,    // divider modulus for the next cycle
  output logic [FRAC_W-1:0]       residue   // accumulator after this cycle
);

  logic [FRAC_W:0] sum;
  assign sum = {1'b0, residue} + {1'b0, fcw[FRAC_W-1:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      residue <= '0;
      ratio   <= '0;
    end else if (en) begin
      residue <= sum[FRAC_W-1:0];
      ratio   <= fcw[INT_W+FRAC_W-1:FRAC_W] + INT_W'(sum[FRAC_W])
                 + INT_W'(signed'(es_adj));
    end
  end

endmodule
