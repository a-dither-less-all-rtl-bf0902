// Self-checking testbench of tdc_gain_cal in a closed loop with a simple
// plant: the residual phase error seen after spur cancellation is
// proportional to (1 - Gc * t) * residue, t being the unknown TDC gain
// error.  Checks that Gc converges to 1/t, that the analog word takes the
// coarse part and that Gd + ax*STEP equals Gc, and that en=0 freezes it.
`timescale 1ps/1fs
module tb_tdc_gain_cal;
  import adpll_pkg::*;
  localparam int STEP = 262;
  logic clk = 0, rst_n = 1, en;
  logic signed [15:0] e;
  logic signed [FCW_FRAC_W:0] res_c;
  logic [17:0] gc, gd;
  logic [TDC_GX_W-1:0] gx_word;
  int checks = 0, failures = 0;

  tdc_gain_cal dut (.clk, .rst_n, .en, .e, .res_c, .gc, .gd, .gx_word);

  always #500 clk = ~clk;
  initial begin #200_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real t;
  // plant: e in TDC LSB/16, residue scaled by K0 = 55.56 LSB per DCO/2 cycle
  always_comb begin
    real v;
    v = (1.0 - real'(gc) / 16384.0 * t) * real'(res_c) / 65536.0 * 55.56 * 16.0;
    e = 16'($rtoi(v));
  end

  task automatic run_to(input real tt, input int n);
    t = tt;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      res_c = (FCW_FRAC_W+1)'(int'($urandom_range(0, 65535)) - 32768);
    end
  endtask

  initial begin
    int ax, g_exp, g_prev;
    t = 1.0; en = 0; res_c = '0;
    #1 rst_n = 0; #1000 rst_n = 1;
    @(posedge clk); #1;
    check(gc == 18'd16384 && gd == 18'd16384, "unity gain after reset");
    check(int'(gx_word) == (1 << (TDC_GX_W - 1)), "analog word mid after reset");
    en = 1;
    for (int k = 0; k < 3; k++) begin
      real tt;
      tt = (k == 0) ? 0.92 : (k == 1) ? 1.06 : 0.985;
      run_to(tt, 60000);
      g_exp = int'(16384.0 / tt);
      ax = int'(gx_word) - (1 << (TDC_GX_W - 1));
      $display("t=%f gc=%0d expected %0d gd=%0d ax=%0d", tt, gc, g_exp, gd, ax);
      check(int'(gc) > g_exp - 160 && int'(gc) < g_exp + 160, "Gc converges to 1/t within 1 %");
      check(int'(gd) + ax * STEP == int'(gc), "Gd + ax*STEP equals Gc");
      check(int'(gc) - 16384 - ax * STEP <= STEP && int'(gc) - 16384 - ax * STEP >= -STEP,
            "analog word carries the coarse part");
    end
    en = 0; g_prev = int'(gc);
    run_to(0.8, 3000);
    check(int'(gc) == g_prev, "en=0 freezes the calibration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
