// tdc_lin_corr: digital fine linearity correction of the TDC output.
//
// After the foreground calibration has trimmed the delay elements, every
// output code can still be moved by a small amount so that the quantization
// levels sit where the measured thresholds say they should.  The document
// gives this function and limits the shift to 0.5 LSB; it does not give the
// storage or the number format.  Here a table holds one signed offset per code
// with FB fractional bits; writes are clamped to +/-0.5 LSB.  The table is
// written through a simple address/data port (this design's choice) and is
// cleared by reset.  Output: code + offset, signed with FB fractional bits,
// registered (one cycle of latency).
`timescale 1ps/1fs
module tdc_lin_corr
  import adpll_pkg::*;
#(
  parameter int LEVELS = TDC_LEVELS,
  parameter int W      = TDC_W,
  parameter int FB     = TDC_FB
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [W-1:0]            code,
  // table write port
  input  logic                    wr_en,
  input  logic [W-1:0]            wr_addr,
  input  logic signed [FB+1:0]    wr_ofs,   // requested shift, clamped
  output logic signed [W+FB:0]    code_corr
);

  localparam int OW = FB + 2;  // enough for +/- 2^(FB-1)
  localparam logic signed [OW-1:0] OMAX = OW'(1 << (FB - 1));
  localparam logic signed [OW-1:0] OMIN = -OMAX;

  logic signed [OW-1:0] lut [LEVELS+1];
  logic signed [OW-1:0] wr_clamped;

  always_comb begin
    if (wr_ofs > OMAX)      wr_clamped = OMAX;
    else if (wr_ofs < OMIN) wr_clamped = OMIN;
    else                    wr_clamped = wr_ofs;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= LEVELS; i++) lut[i] <= '0;
      code_corr <= '0;
    end else begin
      if (wr_en && (int'(wr_addr) <= LEVELS)) lut[wr_addr] <= wr_clamped;
      if (int'(code) <= LEVELS)
        code_corr <= $signed({1'b0, code, FB'(0)}) + (W+FB+1)'(lut[code]);
      else
        code_corr <= $signed({1'b0, code, FB'(0)});
    end
  end

endmodule
