// Self-checking testbench of tdc_decoder: random thermometer words with a
// random fill level (and random bubbles), checks the registered count of
// ones and the two saturation flags.
`timescale 1ps/1fs
module tb_tdc_decoder;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 1;
  logic [TDC_LEVELS-1:0] therm;
  logic [TDC_W-1:0] code;
  logic sat_low, sat_high;
  int checks = 0, failures = 0;

  tdc_decoder dut (.clk, .rst_n, .therm, .code, .sat_low, .sat_high);

  always #500 clk = ~clk;
  initial begin #10_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int k, exp_ones;
    therm = '0;
    #1 rst_n = 0; #1000 rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      k = (n < 4) ? ((n == 0) ? 0 : (n == 1) ? TDC_LEVELS : n) : int'($urandom_range(0, TDC_LEVELS));
      therm = '0;
      for (int i = 0; i < k; i++) therm[i] = 1'b1;
      if (n % 7 == 3 && k > 2 && k < TDC_LEVELS - 2) begin  // one bubble
        therm[k-2] = 1'b0; therm[k] = 1'b1;
      end
      exp_ones = $countones(therm);
      @(posedge clk); #1;
      check(int'(code) == exp_ones, $sformatf("code %0d expected %0d", code, exp_ones));
      check(sat_low == (exp_ones == 0), "sat_low");
      check(sat_high == (exp_ones == TDC_LEVELS), "sat_high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
