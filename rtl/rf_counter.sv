// rf_counter: RF edge counter read once per reference cycle.
//
// A free-running binary counter runs on the RF clock (the 1.8 GHz carrier,
// DCO/4).  Its Gray-coded copy crosses into the reference domain through two
// flip-flops, is converted back to binary, and the difference with the previous
// reading is the number of RF edges in the last reference cycle.  The document
// states the function (RF counter for AFCAL and FLL, about 2 GHz); the Gray
// synchronizer is this design's choice.  Output `delta` is valid from the
// third reference edge after reset and then every cycle (latency 3 cycles).
`timescale 1ps/1fs
module rf_counter #(
  parameter int W = 12
) (
  input  logic         rf_clk,
  input  logic         ref_clk,
  input  logic         rst_n,
  output logic [W-1:0] delta,     // RF edges in the last reference cycle
  output logic         valid
);

  // RF domain
  logic [W-1:0] bin_rf, gray_rf;
  always_ff @(posedge rf_clk or negedge rst_n) begin
    if (!rst_n) begin
      bin_rf  <= '0;
      gray_rf <= '0;
    end else begin
      bin_rf  <= bin_rf + W'(1);
      gray_rf <= (bin_rf + W'(1)) ^ ((bin_rf + W'(1)) >> 1);
    end
  end

  // reference domain
  logic [W-1:0] s1, s2, bin_ref, last;
  logic [1:0]   vcnt;

  always_comb begin
    bin_ref[W-1] = s2[W-1];
    for (int i = W - 2; i >= 0; i--) bin_ref[i] = bin_ref[i+1] ^ s2[i];
  end

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      s1    <= '0;
      s2    <= '0;
      last  <= '0;
      delta <= '0;
      vcnt  <= '0;
      valid <= 1'b0;
    end else begin
      s1    <= gray_rf;
      s2    <= s1;
      last  <= bin_ref;
      delta <= bin_ref - last;
      if (vcnt != 2'd3) vcnt <= vcnt + 2'd1;
      valid <= (vcnt == 2'd3);
    end
  end

endmodule
