// dco_fine_encoder: drives the 16x16 fine-tuning varactor matrix of the DCO.
//
// As in the document, the 8 MSBs of the 12-bit fine word switch a
// thermometric fill of 255 of the 256 matrix cells, and the remaining cell is
// tied to a 4-bit DAC driven by the 4 LSBs, which gives 16 intermediate
// levels of one unit cell.  Cell i is on when i < word[11:4] (fill order =
// cell index; the row/column order of the physical matrix is not given).
// Outputs are registered so that the tank sees one clean update per reference
// cycle.
`timescale 1ps/1fs
module dco_fine_encoder
  import adpll_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [FINE_W-1:0]     word,
  output logic [FINE_CELLS-1:0] cells,   // 1 = cell switched in
  output logic [FINE_DAC_W-1:0] dac
);

  logic [FINE_MSB_W-1:0] n_on;
  assign n_on = word[FINE_W-1:FINE_DAC_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cells <= '0;
      dac   <= '0;
    end else begin
      for (int i = 0; i < FINE_CELLS; i++) cells[i] <= (i < int'(n_on));
      dac <= word[FINE_DAC_W-1:0];
    end
  end

endmodule
