// Self-checking testbench of the tdc_vernier model: sweeps the delay of the
// signal edge after the reference edge from -100 ps to +600 ps and checks the
// thermometer count against the 5 ps Vernier thresholds (-45..545 ps), the
// shape of the thermometer word, the effect of the line-X gain word, and the
// DLL comparator (10,11) on both sides of 10*tau1 = 11*tau2.
`timescale 1ps/1fs
module tb_tdc_vernier;
  import adpll_pkg::*;
  logic ref_in = 0, sig_in = 0;
  logic [TDC_GX_W-1:0] gx;
  logic [TDC_GY_W-1:0] gy;
  logic [TDC_LEVELS-1:0] therm;
  logic cal_cmp;
  int checks = 0, failures = 0;

  tdc_vernier dut (.ref_in, .sig_in, .gx, .gy, .therm, .cal_cmp);

  initial begin #500_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one measurement: signal edge dt ps after the reference edge
  task automatic measure(input real dt, output int code);
    #(10000.0);
    if (dt < 0.0) begin #(20000.0 + dt); sig_in = 1; #(-dt); ref_in = 1; end
    else          begin #(20000.0); ref_in = 1; #(dt); sig_in = 1; end
    #(2000.0);
    code = $countones(therm);
    #(17000.0); ref_in = 0; sig_in = 0;
  endtask

  initial begin
    int code, ex, bad, badshape;
    real dt;
    gx = TDC_GX_W'(1 << (TDC_GX_W - 1));
    gy = TDC_GY_W'(1 << (TDC_GY_W - 1));
    bad = 0; badshape = 0;
    for (int i = -100; i <= 600; i += 3) begin
      dt = real'(i) + 0.5;
      measure(dt, code);
      ex = 0;
      for (int k = -9; k <= 109; k++) if (dt > 5.0 * k) ex++;
      if (code != ex) begin bad++; if (bad < 4) $display("dt %f code %0d expected %0d", dt, code, ex); end
      for (int b = 0; b < TDC_LEVELS; b++) if (therm[b] != (b < code)) badshape++;
    end
    check(bad == 0, "code follows the 5 ps thresholds from -45 to 545 ps");
    check(badshape == 0, "thermometer word without bubbles");
    measure(-200.0, code); check(code == 0, "saturates low when the signal leads");
    measure(800.0, code);  check(code == TDC_LEVELS, "saturates high when the signal lags");
    // gain word: larger gx shortens tau1, so a fixed delay gives a larger code
    gx = gx + 5'd4; measure(300.5, code);
    check(code > 69 + 2, $sformatf("line-X gain word raises the code (%0d)", code));
    gx = gx - 5'd8; measure(300.5, code);
    check(code < 69 - 2, $sformatf("line-X gain word lowers the code (%0d)", code));
    gx = TDC_GX_W'(1 << (TDC_GX_W - 1));
    // DLL comparator: longer tau2 (larger gy) -> 10*tau1 < 11*tau2
    gy = TDC_GY_W'(40); measure(0.0, code);
    check(cal_cmp == 1'b1, "comparator (10,11) high with line Y slow");
    gy = TDC_GY_W'(24); measure(0.0, code);
    check(cal_cmp == 1'b0, "comparator (10,11) low with line Y fast");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
