// adpll_core: synthesizable digital part of the dither-less ADPLL.
//
// Fractional-N, type-II, two-point-modulation digital PLL.  Everything here runs on the reference clock except
// the multi-modulus divider (DCO/2 clock) and the front of the RF counter
// (carrier clock, DCO/4).
//
// Phase path: TDC thermometer code -> tdc_decoder -> tdc_lin_corr ->
// spur_cancel (gain-corrected code plus scaled sigma-delta residue) -> phase
// error e -> loop_filter (PI, gear shifting) -> + lo_predistortion(modulation)
// -> dco_fine_encoder -> DCO fine bank.
// Divider path: FCW (+ modulation, + DCO-calibration offset) -> sd_modulator
// (+ edge-search adjustment) -> mmd.
// Frequency path: rf_counter -> afcal (coarse banks, bias) and fll_filter.
// Calibrations: tdc_gain_cal (zero forcing, background; held off while the
// fractional spur is in band, i.e. the FCW fraction is within
// cfg.gcal_min_frac of an integer), tdc_dll_cal (delay
// line ratio, background on the falling edge), dco_cal (foreground, after the
// gear shifts), tdc_histogram (code density of the TDC, foreground, on
// request).  lock_ctrl sequences AFCAL, FLL, edge search, PLL wide band,
// gear shifts, DCO calibration and operation.
//
// Interface timing: tdc_therm must be stable at each reference rising edge
// (the TDC model updates it 700 ps after the reference edge); outputs to the
// DCO and TDC are registered on the reference clock.
`timescale 1ps/1fs
module adpll_core
  import adpll_pkg::*;
(
  input  logic                    ref_clk,
  input  logic                    rst_n,
  input  logic                    lo2_clk,      // DCO/2, divider input
  input  logic                    car_clk,      // DCO/4, RF counter input
  input  logic                    start,
  input  adpll_cfg_t              cfg,
  input  logic signed [15:0]      mod,          // frequency deviation, FCW LSBs
  // TDC
  input  logic [TDC_LEVELS-1:0]   tdc_therm,
  input  logic                    tdc_cal_cmp,  // comparator (10,11)
  output logic                    div_clk,      // signal edge to the TDC
  output logic [TDC_GX_W-1:0]     tdc_gx,       // line X gain control
  output logic [TDC_GY_W-1:0]     tdc_gy,       // line Y DLL calibration
  // TDC linearity table write port
  input  logic                    lin_wr_en,
  input  logic [TDC_W-1:0]        lin_wr_addr,
  input  logic signed [TDC_FB+1:0] lin_wr_ofs,
  // TDC code histogram (foreground linearity measurement)
  input  logic                    hist_start,
  input  logic [TDC_W-1:0]        hist_rd_addr,
  output logic [HIST_LOG2:0]      hist_count,
  output logic [HIST_LOG2:0]      hist_cum,
  output logic                    hist_done,
  // DCO
  input  logic                    dco_amp_ok,
  output logic [MSB_BANK_W-1:0]   dco_msb,
  output logic [LSB_BANK_W-1:0]   dco_lsb,
  output logic [BIAS_W-1:0]       dco_bias,
  output logic [FINE_CELLS-1:0]   dco_cells,
  output logic [FINE_DAC_W-1:0]   dco_dac,
  // status
  output lock_state_e             state,
  output logic [1:0]              gear,
  output logic                    locked,
  output logic [FINE_W-1:0]       dco_word,
  output logic signed [15:0]      phase_err,
  output logic [17:0]             tdc_gain,
  output logic [9:0]              es_steps,
  output logic                    tdc_sat,     // TDC code at either end of its range
  output logic signed [23:0]      pd_a1,
  output logic signed [23:0]      pd_a2
);

  // ---------------------------------------------------------------- TDC path
  logic [TDC_W-1:0]          code;
  logic                      sat_low, sat_high;
  assign tdc_sat = sat_low | sat_high;
  logic signed [TDC_W+TDC_FB:0] code_corr;
  logic [FCW_FRAC_W-1:0]     residue;
  logic [17:0]               gd;
  logic signed [FCW_FRAC_W:0] res_c;
  logic signed [15:0]        e;

  tdc_decoder u_dec (
    .clk(ref_clk), .rst_n, .therm(tdc_therm), .code, .sat_low, .sat_high
  );

  tdc_lin_corr u_lin (
    .clk(ref_clk), .rst_n, .code, .wr_en(lin_wr_en), .wr_addr(lin_wr_addr),
    .wr_ofs(lin_wr_ofs), .code_corr
  );

  spur_cancel u_canc (
    .clk(ref_clk), .rst_n, .code_corr, .residue, .gd, .e, .res_c
  );

  logic pll_on;
  assign pll_on = (state == ST_PLL) || (state == ST_DCOCAL) || (state == ST_OPER);

  // The gain calibration must not run when the fractional spur falls inside
  // the loop bandwidth: the spur offset is the distance of the FCW fraction
  // from the nearest integer, times the reference frequency.
  logic [FCW_FRAC_W-1:0] fcw_frac, frac_dist;
  logic                  spur_out_of_band;
  assign fcw_frac         = cfg.fcw[FCW_FRAC_W-1:0];
  assign frac_dist        = fcw_frac[FCW_FRAC_W-1] ? ('0 - fcw_frac) : fcw_frac;
  assign spur_out_of_band = frac_dist >= cfg.gcal_min_frac;

  tdc_gain_cal u_gcal (
    .clk(ref_clk), .rst_n,
    .en(pll_on && cfg.gcal_en && spur_out_of_band && state != ST_DCOCAL), .e, .res_c,
    .gc(tdc_gain), .gd, .gx_word(tdc_gx)
  );

  tdc_dll_cal u_dll (
    .clk(ref_clk), .rst_n, .en(1'b1), .cmp(tdc_cal_cmp), .cal_word(tdc_gy)
  );

  assign phase_err = e;

  // code density of the TDC for the foreground linearity calibration
  tdc_histogram #(.N_LOG2(HIST_LOG2)) u_hist (
    .clk(ref_clk), .rst_n, .start(hist_start), .code, .rd_addr(hist_rd_addr),
    .rd_count(hist_count), .rd_cum(hist_cum), .busy(), .done(hist_done)
  );

  // ------------------------------------------------------------ divider path
  logic signed [15:0]  cal_ofs, mod_eff;
  logic [FCW_W-1:0]    fcw_eff;
  logic signed [1:0]   es_adj;
  logic [FCW_INT_W-1:0] ratio;
  logic                es_done;

  assign mod_eff = (cfg.mod_en && state == ST_OPER) ? mod : 16'sd0;
  assign fcw_eff = cfg.fcw + FCW_W'(signed'(cal_ofs)) + FCW_W'(signed'(mod_eff));

  sd_modulator u_sdm (
    .clk(ref_clk), .rst_n, .en(1'b1), .fcw(fcw_eff),
    .es_adj((state == ST_EDGE) ? es_adj : 2'sd0), .ratio, .residue
  );

  mmd #(.W(FCW_INT_W)) u_mmd (
    .clk_in(lo2_clk), .rst_n, .ratio, .div_out(div_clk)
  );

  // ---------------------------------------------------------- frequency path
  logic [11:0]         rf_cnt;
  logic                rf_valid;
  logic                afcal_start, afcal_done;
  logic                fll_clr, fll_locked;
  logic [FINE_W-1:0]   fll_word;

  rf_counter #(.W(12)) u_rfc (
    .rf_clk(car_clk), .ref_clk, .rst_n, .delta(rf_cnt), .valid(rf_valid)
  );

  afcal u_afcal (
    .clk(ref_clk), .rst_n, .start(afcal_start), .fcw(cfg.fcw), .count(rf_cnt),
    .amp_ok(dco_amp_ok), .msb(dco_msb), .lsb(dco_lsb), .bias(dco_bias),
    .busy(), .done(afcal_done), .iters()
  );

  fll_filter u_fll (
    .clk(ref_clk), .rst_n, .en((state == ST_FLL) || (state == ST_EDGE)),
    .clr(fll_clr), .fcw(cfg.fcw), .count(rf_cnt), .count_valid(rf_valid),
    .word(fll_word), .locked(fll_locked)
  );

  logic es_start;
  edge_search u_es (
    .clk(ref_clk), .rst_n, .start(es_start), .sat_low, .sat_high,
    .adj(es_adj), .done(es_done), .steps(es_steps)
  );

  // ------------------------------------------------------------ phase loop
  logic                lf_load;
  logic [FINE_W-1:0]   lf_word, lf_word_prev;

  loop_filter u_lf (
    .clk(ref_clk), .rst_n, .en(pll_on), .load(lf_load), .init_word(fll_word),
    .e, .gear, .gears(cfg.gears), .word(lf_word), .word_prev(lf_word_prev)
  );

  // ------------------------------------------------ DCO calibration and TPM
  logic dcocal_start, dcocal_done;
  dco_cal u_dcal (
    .clk(ref_clk), .rst_n, .start(dcocal_start), .word(lf_word),
    .fcw_ofs(cal_ofs), .a1(pd_a1), .a2(pd_a2), .busy(),
    .done(dcocal_done)
  );

  logic signed [13:0] pd_ofs;
  lo_predistortion u_pd (
    .clk(ref_clk), .rst_n, .en(cfg.mod_en && state == ST_OPER), .m(mod_eff),
    .a1(pd_a1), .a2(pd_a2), .d(pd_ofs)
  );

  always_comb begin
    logic signed [FINE_W+2:0] w;
    unique case (state)
      ST_FLL, ST_EDGE:              w = (FINE_W+3)'(fll_word);
      ST_PLL, ST_DCOCAL, ST_OPER:   w = (FINE_W+3)'(lf_word) + (FINE_W+3)'(pd_ofs);
      default:                      w = (FINE_W+3)'(1 << (FINE_W - 1));
    endcase
    if (w < 0)                        dco_word = '0;
    else if (w > (1 << FINE_W) - 1)   dco_word = '1;
    else                              dco_word = FINE_W'(w);
  end

  dco_fine_encoder u_enc (
    .clk(ref_clk), .rst_n, .word(dco_word), .cells(dco_cells), .dac(dco_dac)
  );

  // ------------------------------------------------------------- sequencing
  lock_ctrl u_ctrl (
    .clk(ref_clk), .rst_n, .start, .cfg, .afcal_done, .fll_locked, .es_done,
    .dcocal_done, .word(lf_word), .word_prev(lf_word_prev), .state, .gear,
    .afcal_start, .fll_clr, .es_start, .lf_load, .dcocal_start, .locked
  );

endmodule
