// tb_adpll_workloads: the ADPLL at its default parameters on the operating
// points that differ from the main 26 MHz / 1.8 GHz case only in their
// numbers: a 27 MHz reference, other channels across the DCO range, the
// 900 MHz (DCO/8) output, a channel whose fractional part is so small
// that the fractional spur falls inside the loop bandwidth, and an integer
// channel.  The TDC gain calibration is enabled on every point with an
// in-band limit of 1024 FCW fraction LSBs (406 kHz at 26 MHz); on the last
// two the design must hold it off, and the test checks that the gain stayed
// at 1.0, and that it moved on the others.  For every point the complete locking sequence
// runs from reset; the test checks lock, lock time, the carrier and low-band
// carrier frequencies by edge counting over 1024 reference cycles, a small
// phase error and no TDC saturation after lock, and counts each phase of the
// sequence.
`timescale 1ps/1fs
module tb_adpll_workloads;
  import adpll_pkg::*;

  real tref_ps = 1.0e6 / 26.0;
  logic ref_clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  adpll_cfg_t cfg;
  logic car_clk, car_lb_clk, div_clk, locked;
  lock_state_e state;
  logic [1:0] gear;
  logic [FINE_W-1:0] dco_word;
  logic [MSB_BANK_W-1:0] dco_msb;
  logic [LSB_BANK_W-1:0] dco_lsb;
  logic [BIAS_W-1:0] dco_bias;
  logic signed [15:0] phase_err;
  logic [17:0] tdc_gain;
  logic [TDC_GX_W-1:0] tdc_gx;
  logic [TDC_GY_W-1:0] tdc_gy;
  logic [9:0] es_steps;
  logic tdc_sat;
  logic signed [23:0] pd_a1, pd_a2;

  adpll dut (
    .ref_clk, .rst_n, .start, .cfg, .mod(16'sd0),
    .lin_wr_en(1'b0), .lin_wr_addr('0), .lin_wr_ofs('0),
    .hist_start(1'b0), .hist_rd_addr('0), .hist_count(), .hist_cum(), .hist_done(),
    .car_clk, .car_lb_clk, .div_clk, .state, .gear, .locked, .dco_word,
    .dco_msb, .dco_lsb, .dco_bias, .phase_err, .tdc_gain, .tdc_gx, .tdc_gy,
    .es_steps, .tdc_sat, .pd_a1, .pd_a2
  );

  real t_ref = 0.0;
  always begin
    t_ref = t_ref + tref_ps / 2.0;
    #(t_ref - $realtime) ref_clk = ~ref_clk;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  longint car_edges = 0, lb_edges = 0;
  always @(posedge car_clk) car_edges++;
  always @(posedge car_lb_clk) lb_edges++;
  int n_state [8];
  always @(posedge ref_clk) n_state[int'(state)]++;

  task automatic run_point(input string name, input real fref_mhz, input real fdco_ghz, input bit gcal_runs);
    longint fcw, c0, l0, t;
    real ex, mc, ml;
    int maxerr, nsat;
    foreach (n_state[i]) n_state[i] = 0;
    tref_ps = 1.0e6 / fref_mhz;
    fcw = longint'(fdco_ghz * 1.0e3 / 2.0 / fref_mhz * 65536.0 + 0.5);
    cfg = '0;
    cfg.fcw       = FCW_W'(fcw);
    cfg.gears[0]  = '{kp_sh: 5'sd6, ki_sh: 5'sd2};
    cfg.gears[1]  = '{kp_sh: 5'sd5, ki_sh: 5'sd0};
    cfg.gears[2]  = '{kp_sh: 5'sd4, ki_sh: -5'sd2};
    cfg.gears[3]  = '{kp_sh: 5'sd3, ki_sh: -5'sd4};
    cfg.last_gear = 2'd3;
    cfg.gs_thr    = 8'd128;
    cfg.gs_hold   = 8'd16;
    cfg.gs_int1   = 8'd40;
    cfg.gs_int2   = 8'd51;
    cfg.gcal_en   = 1'b1;
    cfg.gcal_min_frac = 16'd1024;
    cfg.dcocal_en = 1'b1;
    @(posedge ref_clk); #1 rst_n = 1'b0;
    repeat (4) @(posedge ref_clk);
    rst_n = 1'b1;
    repeat (4) @(posedge ref_clk);
    start = 1'b1;
    @(posedge ref_clk);
    start = 1'b0;
    t = 0;
    while (locked !== 1'b1 && t < 6000) begin @(posedge ref_clk); t++; end
    check(locked, {name, ": locked"});
    check(t < 4000, {name, ": lock time below 4000 reference cycles"});
    repeat (200) @(posedge ref_clk);
    c0 = car_edges; l0 = lb_edges; maxerr = 0; nsat = 0;
    for (int i = 0; i < 1024; i++) begin
      @(posedge ref_clk);
      if (int'(phase_err) > maxerr) maxerr = int'(phase_err);
      if (-int'(phase_err) > maxerr) maxerr = -int'(phase_err);
      if (tdc_sat) nsat++;
    end
    ex = real'(fcw) / 65536.0 / 2.0 * 1024.0;
    mc = real'(car_edges - c0);
    ml = real'(lb_edges - l0);
    $display("%s: FCW %0d (%0.4f), lock %0d cycles = %0.1f us, carrier %0.1f/%0.1f, low band %0.1f/%0.1f, max |e| %0.2f LSB, gain %0.4f",
             name, fcw, real'(fcw) / 65536.0, t, real'(t) * tref_ps * 1.0e-6, mc, ex, ml, ex / 2.0,
             maxerr / 16.0, tdc_gain / 16384.0);
    check(mc - ex < 3.0 && ex - mc < 3.0, {name, ": carrier (DCO/4) frequency"});
    check(ml - ex / 2.0 < 2.0 && ex / 2.0 - ml < 2.0, {name, ": low-band carrier (DCO/8) frequency"});
    check(maxerr < 16 * 16, {name, ": phase error below 16 LSB (half the linear margin) after lock"});
    check(nsat == 0, {name, ": no TDC saturation after lock"});
    if (gcal_runs) check(tdc_gain != 18'd16384, {name, ": TDC gain calibration ran"});
    else           check(tdc_gain == 18'd16384, {name, ": TDC gain calibration held off (spur in band)"});
    check(n_state[int'(ST_AFCAL)] > 0 && n_state[int'(ST_FLL)] > 0 && n_state[int'(ST_EDGE)] > 0 &&
          n_state[int'(ST_PLL)] > 0 && n_state[int'(ST_DCOCAL)] > 0, {name, ": every locking phase ran"});
  endtask

  initial begin
    cfg = '0;
    run_point("27 MHz reference, 1.8 GHz / 900 MHz", 27.0, 7.2, 1'b1);
    run_point("26 MHz, 1.75 GHz / 875 MHz channel", 26.0, 7.0, 1'b1);
    run_point("26 MHz, 1.95 GHz / 975 MHz channel", 26.0, 7.81, 1'b1);
    run_point("26 MHz, integer channel 1.95 GHz", 26.0, 7.8, 1'b0);
    run_point("26 MHz, near-integer channel (101 kHz spur, in band)", 26.0, 7.176203, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1.0e6 / 26.0 * 50000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
