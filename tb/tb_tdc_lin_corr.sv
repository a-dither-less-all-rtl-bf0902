// Self-checking testbench of tdc_lin_corr: writes random per-code shifts
// (also outside the +/-0.5 LSB limit) and checks the corrected code against
// code*16 + clamp(shift) for random codes.
`timescale 1ps/1fs
module tb_tdc_lin_corr;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 1;
  logic [TDC_W-1:0] code, wr_addr;
  logic wr_en;
  logic signed [TDC_FB+1:0] wr_ofs;
  logic signed [TDC_W+TDC_FB:0] code_corr;
  int model [TDC_LEVELS+1];
  int checks = 0, failures = 0;

  tdc_lin_corr dut (.clk, .rst_n, .code, .wr_en, .wr_addr, .wr_ofs, .code_corr);

  always #500 clk = ~clk;
  initial begin #10_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int o, c;
    code = '0; wr_en = 0; wr_addr = '0; wr_ofs = '0;
    foreach (model[i]) model[i] = 0;
    #1 rst_n = 0; #1000 rst_n = 1;
    // after reset every shift is zero
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); code = TDC_W'($urandom_range(0, TDC_LEVELS));
      @(posedge clk); #1;
      check(int'(code_corr) == int'(code) * 16, "identity after reset");
    end
    for (int i = 0; i <= TDC_LEVELS; i++) begin
      @(negedge clk);
      o = int'($urandom_range(0, 31)) - 16;
      wr_en = 1; wr_addr = TDC_W'(i); wr_ofs = (TDC_FB+2)'(o);
      model[i] = (o > 8) ? 8 : (o < -8) ? -8 : o;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk); c = int'($urandom_range(0, TDC_LEVELS)); code = TDC_W'(c);
      @(posedge clk); #1;
      check(int'(code_corr) == c * 16 + model[c],
            $sformatf("code %0d corr %0d expected %0d", c, code_corr, c * 16 + model[c]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
