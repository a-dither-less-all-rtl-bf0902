// Self-checking testbench of afcal with a DCO model: 13-bit coarse code at
// 0.28 MHz per step from 5.8 GHz, oscillation amplitude proportional to
// bias * f, carrier (DCO/4) edges counted per 26 MHz reference cycle.
// Checks for three targets that AFCAL ends near the target frequency, with
// the oscillator above the amplitude threshold and a bias near the minimum.
`timescale 1ps/1fs
module tb_afcal;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 1, start;
  logic [FCW_W-1:0] fcw;
  logic [11:0] count;
  logic amp_ok;
  logic [MSB_BANK_W-1:0] msb;
  logic [LSB_BANK_W-1:0] lsb;
  logic [BIAS_W-1:0] bias;
  logic busy, done;
  logic [5:0] iters;
  int checks = 0, failures = 0;
  real acc = 0.0;

  afcal dut (.clk, .rst_n, .start, .fcw, .count, .amp_ok, .msb, .lsb, .bias, .busy, .done, .iters);

  always #19231 clk = ~clk;
  initial begin #2_000_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real fdco();
    return 5.8e9 + real'({msb, lsb}) * 0.28e6;
  endfunction
  always_comb amp_ok = (real'(bias) * fdco() / 7.2e9) >= 12.0;
  always @(posedge clk) begin
    real a0;
    a0 = acc;
    acc = acc + ((bias == 0) ? 0.0 : fdco() / 4.0 / 26.0e6);
    count <= 12'($floor(acc) - $floor(a0));
  end

  initial begin
    real ft, err;
    int t, bmin;
    start = 0; count = '0;
    #1 rst_n = 0; #1000 rst_n = 1;
    check(bias == 0 && !busy, "off after reset");
    for (int k = 0; k < 3; k++) begin
      ft = (k == 0) ? 7.2e9 : (k == 1) ? 6.1e9 : 7.93e9;
      fcw = 24'($rtoi(ft / 2.0 / 26.0e6 * 65536.0));
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      t = 0;
      while (!done && t < 3000) begin @(posedge clk); t++; end
      err = fdco() - ft;
      bmin = int'($ceil(12.0 * 7.2e9 / fdco()));
      $display("target %f GHz: %0d cycles (%f us), %0d iterations, error %f MHz, bias %0d (min %0d)",
               ft / 1e9, t, t / 26.0, iters, err / 1e6, bias, bmin);
      check(done && !busy, "AFCAL finished");
      check(err < 4.0e6 && err > -4.0e6, "coarse frequency within the fine range");
      check(amp_ok, "amplitude above threshold");
      check(int'(bias) <= bmin + 1, "bias close to the minimum");
      @(negedge clk); start = 1; @(negedge clk); start = 0;  // back to idle
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
