// Self-checking testbench of the dco model: measures the DCO frequency from
// the carrier (DCO/4) edges and checks the fine tuning range of 8.44 MHz,
// its monotonic and curved characteristic, the coarse bank steps, the
// tuning range, the /2 /4 /8 outputs and the amplitude detector.
`timescale 1ps/1fs
module tb_dco;
  import adpll_pkg::*;
  logic [MSB_BANK_W-1:0] msb;
  logic [LSB_BANK_W-1:0] lsb;
  logic [FINE_CELLS-1:0] cells;
  logic [FINE_DAC_W-1:0] dac;
  logic [BIAS_W-1:0] bias;
  logic lo2, car, car_lb, amp_ok;
  int checks = 0, failures = 0;
  int n_lo2 = 0, n_car = 0, n_lb = 0;

  dco dut (.msb, .lsb, .cells, .dac, .bias, .lo2, .car, .car_lb, .amp_ok);

  always @(posedge lo2) n_lo2++;
  always @(posedge car) n_car++;
  always @(posedge car_lb) n_lb++;
  initial begin #2_000_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic set_word(input int w);
    cells = '0;
    for (int i = 0; i < w / 16; i++) cells[i] = 1'b1;
    dac = FINE_DAC_W'(w % 16);
  endtask

  // DCO frequency from 4000 carrier periods
  task automatic meas(output real f);
    realtime t0;
    #(2000.0);
    @(posedge car); t0 = $realtime;
    repeat (4000) @(posedge car);
    f = 4.0 * 4000.0 / (($realtime - t0) * 1.0e-12);
  endtask

  initial begin
    real f0, f1, fm, fa, fb, fl, fh;
    int a, b, c;
    msb = 7'd77; lsb = 6'd20; bias = '0; set_word(0);
    #50000;
    check(n_lo2 == 0, "no oscillation with the bias off");
    bias = 5'd15;
    meas(f0);
    set_word(4095); meas(f1);
    set_word(2048); meas(fm);
    $display("fine: %f %f %f MHz", f0 / 1e6, fm / 1e6, f1 / 1e6);
    check((f1 - f0) > 8.2e6 && (f1 - f0) < 8.5e6, "fine range about 8.44 MHz");
    check(fm < (f0 + f1) / 2.0 - 0.2e6, "fine characteristic curved (convex)");
    set_word(1000); meas(fa);
    set_word(1001); meas(fb);
    check(fb > fa && (fb - fa) < 4.0e3, $sformatf("one fine step about 2 kHz (%f kHz)", (fb - fa) / 1e3));
    set_word(2048);
    msb = 7'd78; meas(fb);
    check((fb - fm) > 17.5e6 && (fb - fm) < 18.5e6, "MSB bank step 18 MHz");
    msb = 7'd77; lsb = 6'd21; meas(fb);
    check((fb - fm) > 0.25e6 && (fb - fm) < 0.35e6, "LSB bank step 0.3 MHz");
    msb = '0; lsb = '0; bias = 5'd20; meas(fl);
    msb = '1; lsb = '1; bias = 5'd14; meas(fh);
    $display("tuning range %f .. %f GHz", fl / 1e9, fh / 1e9);
    check(fl < 5.81e9 && fh > 8.09e9, "tuning range about 5.8 to 8.1 GHz");
    a = n_lo2; b = n_car; c = n_lb;
    #100000;
    a = n_lo2 - a; b = n_car - b; c = n_lb - c;
    check(b >= a / 2 - 1 && b <= a / 2 + 1 && c >= b / 2 - 1 && c <= b / 2 + 1, "divide by 2 and 4 outputs");
    msb = 7'd77; lsb = 6'd20; bias = 5'd6; #1;
    check(!amp_ok, "amplitude detector low at low bias");
    bias = 5'd13; #1;
    check(amp_ok, "amplitude detector high at sufficient bias");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
