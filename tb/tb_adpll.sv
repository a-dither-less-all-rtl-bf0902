// tb_adpll: end-to-end test of the complete ADPLL at its default parameters.
//
// A 26 MHz reference drives the ADPLL (digital core, DCO model, 2-D Vernier
// TDC model) programmed for a 7.2 GHz DCO (1.8 GHz carrier,
// FCW = 7.2 GHz / 2 / 26 MHz = 138.4615).  The test runs the whole locking
// sequence from a powered-down oscillator: AFCAL, FLL, edge search, wide-band
// PLL, the three gear shifts and DCO calibration, then two-point modulation.
// It counts each mechanism and fails the ones that never happen, and checks:
//   * the carrier frequency after locking, by counting carrier edges over
//     1024 reference cycles against FCW/2 per cycle (to 0.2 edge per cycle
//     budget over the window),
//   * the phase error stays small and the TDC never saturates once locked,
//   * the DCO calibration coefficients have the expected size and sign,
//   * the TDC code histogram taken in lock covers about one DCO/2 period
//     (56 codes), with consistent cumulative sums,
//   * the frequency follows a two-point modulation step while the TDC
//     stays in its linear range,
//   * lock time is below 4000 reference cycles (154 us); the measured time
//     (about 101 us) is printed for comparison with the published 79.6 us,
//   * after a reset, on an integer channel (138.0) the loop locks and the
//     TDC gain calibration is held off.
`timescale 1ps/1fs
module tb_adpll;
  import adpll_pkg::*;

  localparam real TREF_PS = 1.0e6 / 26.0;
  localparam longint FCW  = 64'd9074215;   // 138.4615 * 2^16

  logic ref_clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  adpll_cfg_t cfg;
  logic signed [15:0] mod = '0;
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
  logic hist_start = 1'b0, hist_done;
  logic [TDC_W-1:0] hist_rd_addr = '0;
  logic [HIST_LOG2:0] hist_count, hist_cum;

  adpll dut (
    .ref_clk, .rst_n, .start, .cfg, .mod,
    .lin_wr_en(1'b0), .lin_wr_addr('0), .lin_wr_ofs('0),
    .hist_start, .hist_rd_addr, .hist_count, .hist_cum, .hist_done,
    .car_clk, .car_lb_clk, .div_clk, .state, .gear, .locked, .dco_word,
    .dco_msb, .dco_lsb, .dco_bias, .phase_err, .tdc_gain, .tdc_gx, .tdc_gy,
    .es_steps, .tdc_sat, .pd_a1, .pd_a2
  );

  real t_ref = 0.0;
  always begin
    t_ref = t_ref + TREF_PS / 2.0;
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

  // cycle counter and per-state statistics
  longint cyc = 0;
  int n_state [8];
  int n_gear_shift = 0, n_es_adj = 0, n_sat = 0, n_sat_locked = 0;
  lock_state_e st_q = ST_IDLE;
  logic [1:0]  gear_q = '0;
  longint t_lock = 0;
  longint car_edges = 0;

  always @(posedge car_clk) car_edges++;

  always @(posedge ref_clk) begin
    cyc++;
    n_state[int'(state)]++;
    if (state != st_q) $display("[%0d] state %s -> %s  msb=%0d lsb=%0d bias=%0d word=%0d",
                                cyc, st_q.name(), state.name(), dco_msb, dco_lsb, dco_bias, dco_word);
    if (gear != gear_q && gear != 0) begin
      n_gear_shift++;
      $display("[%0d] gear shift to %0d, word=%0d", cyc, gear, dco_word);
    end
    if (state == ST_EDGE && es_steps != 0) n_es_adj++;
    if (tdc_sat) begin
      n_sat++;
      if (locked) n_sat_locked++;
    end
    st_q   <= state;
    gear_q <= gear;
  end

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge ref_clk);
  endtask

  initial begin
    longint e0, e1;
    real    fexp, fmeas;
    int     maxerr;
    int     nwait;
    cfg = '0;
    cfg.fcw       = FCW_W'(FCW);
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
    cfg.mod_en    = 1'b0;
    #1 rst_n = 1'b0;
    wait_cycles(4);
    rst_n = 1'b1;
    wait_cycles(4);
    start = 1'b1;
    wait_cycles(1);
    start = 1'b0;
    // wait for lock
    nwait = 0;
    while (locked !== 1'b1 && nwait < 6000) begin
      @(posedge ref_clk);
      nwait++;
    end
    t_lock = cyc;
    check(locked, "ADPLL locked");
    $display("lock after %0d cycles (%0.1f us)", t_lock, real'(t_lock) * TREF_PS * 1e-6);
    check(t_lock > 0 && t_lock < 4000, "lock time within budget");
    // frequency after lock
    wait_cycles(200);
    e0 = car_edges;
    maxerr = 0;
    for (int i = 0; i < 1024; i++) begin
      @(posedge ref_clk);
      if (int'(phase_err) > maxerr) maxerr = int'(phase_err);
      if (-int'(phase_err) > maxerr) maxerr = -int'(phase_err);
    end
    e1 = car_edges;
    fexp  = real'(FCW) / 65536.0 / 2.0 * 1024.0;
    fmeas = real'(e1 - e0);
    $display("carrier edges %0.1f expected %0.1f, max |e| = %0.2f LSB, gain %0.4f gx %0d gy %0d",
             fmeas, fexp, maxerr / 16.0, tdc_gain / 16384.0, tdc_gx, tdc_gy);
    check((fmeas - fexp) < 3.0 && (fexp - fmeas) < 3.0, "carrier frequency");
    check(maxerr < 16 * 8, "phase error small after lock");
    check(n_sat_locked == 0, "no TDC saturation after lock");
    $display("pd a1=%0d a2=%0d, es steps=%0d", pd_a1, pd_a2, es_steps);
    // a1: fine-word change per FCW LSB.  FCW LSB = 26 MHz / 2^16 at DCO/2,
    // i.e. 793 Hz at the DCO; the model's fine slope near u = 0.55 is
    // 8.44 MHz * (0.45 + 1.1 u) / 4096 = 2.17 kHz per word -> 0.365 (Q.16: 23.9k).
    check(pd_a1 > 21500 && pd_a1 < 28700, "DCO calibration gain a1 (within 20 %)");
    check(pd_a2 < 0, "DCO calibration curvature a2 (convex characteristic)");
    // TDC code histogram in lock: on a fractional channel the divided edge
    // sweeps one DCO/2 period (277.8 ps, about 56 codes of 5 ps)
    hist_start = 1'b1;
    wait_cycles(1);
    hist_start = 1'b0;
    nwait = 0;
    while (hist_done !== 1'b1 && nwait < 6000) begin
      @(posedge ref_clk);
      nwait++;
    end
    check(hist_done, "TDC histogram finished");
    begin
      int tot, used, lo, hi, cmax;
      bit cum_ok;
      tot = 0; used = 0; lo = -1; hi = -1; cmax = 0; cum_ok = 1'b1;
      for (int k = 0; k <= TDC_LEVELS; k++) begin
        hist_rd_addr = TDC_W'(k);
        #1;
        if (int'(hist_cum) != tot) cum_ok = 1'b0;
        tot += int'(hist_count);
        if (hist_count != 0) begin
          used++;
          if (lo < 0) lo = k;
          hi = k;
        end
        if (int'(hist_count) > cmax) cmax = int'(hist_count);
      end
      $display("TDC histogram: %0d samples, codes %0d..%0d (%0d used), largest bin %0d",
               tot, lo, hi, used, cmax);
      check(tot == 2 ** HIST_LOG2, "TDC histogram holds every sample");
      check(cum_ok, "TDC histogram cumulative sums");
      check(hi - lo + 1 >= 45 && hi - lo + 1 <= 80, "TDC histogram spans about one DCO/2 period");
      check(lo > 0 && hi < TDC_LEVELS, "TDC histogram inside the linear range");
      // bins are uneven: the gain calibration has changed the line-X delay,
      // which moves the thresholds of the Vernier plane by different amounts
      check(used >= 35, "TDC histogram: most codes of the swept range hit");
      check(cmax < (2 ** HIST_LOG2) / 8, "TDC histogram: no code takes a large share");
    end
    // two-point modulation: +1024 FCW LSBs (about 812 kHz at the DCO)
    cfg.mod_en = 1'b1;
    mod = 16'sd1024;
    maxerr = 0;
    for (int i = 0; i < 300; i++) begin
      @(posedge ref_clk);
      if (int'(phase_err) > maxerr) maxerr = int'(phase_err);
      if (-int'(phase_err) > maxerr) maxerr = -int'(phase_err);
    end
    e0 = car_edges;
    wait_cycles(1024);
    e1 = car_edges;
    fexp  = real'(FCW + 1024) / 65536.0 / 2.0 * 1024.0;
    fmeas = real'(e1 - e0);
    $display("modulated: carrier edges %0.1f expected %0.1f, max |e| during step %0.2f LSB",
             fmeas, fexp, maxerr / 16.0);
    check((fmeas - fexp) < 3.0 && (fexp - fmeas) < 3.0, "modulated carrier frequency");
    check(maxerr < 16 * 12, "two-point modulation step keeps the TDC linear");
    // mechanisms
    check(n_state[int'(ST_AFCAL)] > 0, "AFCAL ran");
    check(n_state[int'(ST_FLL)] > 0, "FLL ran");
    check(n_state[int'(ST_EDGE)] > 0, "edge search ran");
    check(n_state[int'(ST_PLL)] > 0, "PLL ran");
    check(n_gear_shift == 3, "three gear shifts");
    check(n_state[int'(ST_DCOCAL)] > 0, "DCO calibration ran");
    check(n_es_adj > 0, "edge search moved the divider");
    check(dco_bias > 0, "AFCAL powered the oscillator up");
    check(tdc_gain != 18'd16384, "TDC gain calibration moved the gain");
    // integer channel (138.0): no residue to correlate with, so the gain
    // calibration must be held off and the gain stay at its reset value 1.0
    cfg.mod_en = 1'b0;
    mod        = '0;
    cfg.fcw    = FCW_W'(64'd138 << 16);
    #1 rst_n = 1'b0;
    wait_cycles(4);
    #1 rst_n = 1'b1;
    wait_cycles(4);
    start = 1'b1;
    wait_cycles(1);
    start = 1'b0;
    nwait = 0;
    while (locked !== 1'b1 && nwait < 6000) begin
      @(posedge ref_clk);
      nwait++;
    end
    check(locked, "ADPLL locked on an integer channel");
    wait_cycles(200);
    e0 = car_edges;
    wait_cycles(1024);
    e1 = car_edges;
    fexp  = 138.0 / 2.0 * 1024.0;
    fmeas = real'(e1 - e0);
    $display("integer channel: lock after %0d cycles, carrier edges %0.1f expected %0.1f, gain %0.4f",
             nwait, fmeas, fexp, tdc_gain / 16384.0);
    check((fmeas - fexp) < 3.0 && (fexp - fmeas) < 3.0, "integer-channel carrier frequency");
    check(tdc_gain == 18'd16384, "TDC gain calibration held off on the integer channel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TREF_PS * 20000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
