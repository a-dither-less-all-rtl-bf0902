// adpll: complete dither-less all-digital PLL for a cellular transmitter.
//
// Connects the synthesizable digital core (adpll_core) to behavioural models
// of its two analog blocks, the DCO (dco) and the 2-D Vernier TDC
// (tdc_vernier), as in the document's architecture: reference and divided
// edge into the TDC, DCO/2 into the multi-modulus divider, DCO/4 into the RF
// counter and out as the 1.8 GHz carrier (DCO/8 for 900 MHz).
// Inputs: reference clock (26 MHz), reset, start of the locking sequence,
// configuration, modulation word, the TDC linearity table port and the
// TDC code histogram (start and read port).
// Outputs: carriers and status.  Lock takes about 2600 reference cycles
// (101 us) with the default configuration.
`timescale 1ps/1fs
module adpll
  import adpll_pkg::*;
(
  input  logic                    ref_clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  adpll_cfg_t              cfg,
  input  logic signed [15:0]      mod,
  input  logic                    lin_wr_en,
  input  logic [TDC_W-1:0]        lin_wr_addr,
  input  logic signed [TDC_FB+1:0] lin_wr_ofs,
  // TDC code histogram (foreground linearity measurement)
  input  logic                    hist_start,
  input  logic [TDC_W-1:0]        hist_rd_addr,
  output logic [HIST_LOG2:0]      hist_count,
  output logic [HIST_LOG2:0]      hist_cum,
  output logic                    hist_done,
  output logic                    car_clk,
  output logic                    car_lb_clk,
  output logic                    div_clk,
  output lock_state_e             state,
  output logic [1:0]              gear,
  output logic                    locked,
  output logic [FINE_W-1:0]       dco_word,
  output logic [MSB_BANK_W-1:0]   dco_msb,
  output logic [LSB_BANK_W-1:0]   dco_lsb,
  output logic [BIAS_W-1:0]       dco_bias,
  output logic signed [15:0]      phase_err,
  output logic [17:0]             tdc_gain,
  output logic [TDC_GX_W-1:0]     tdc_gx,
  output logic [TDC_GY_W-1:0]     tdc_gy,
  output logic [9:0]              es_steps,
  output logic                    tdc_sat,
  output logic signed [23:0]      pd_a1,
  output logic signed [23:0]      pd_a2
);

  logic                  lo2_clk, amp_ok, cal_cmp;
  logic [TDC_LEVELS-1:0] therm;
  logic [FINE_CELLS-1:0] cells;
  logic [FINE_DAC_W-1:0] dac;

  adpll_core u_core (
    .ref_clk, .rst_n, .lo2_clk, .car_clk, .start, .cfg, .mod,
    .tdc_therm(therm), .tdc_cal_cmp(cal_cmp), .div_clk, .tdc_gx, .tdc_gy,
    .lin_wr_en, .lin_wr_addr, .lin_wr_ofs,
    .hist_start, .hist_rd_addr, .hist_count, .hist_cum, .hist_done,
    .dco_amp_ok(amp_ok), .dco_msb, .dco_lsb, .dco_bias, .dco_cells(cells),
    .dco_dac(dac), .state, .gear, .locked, .dco_word, .phase_err, .tdc_gain,
    .es_steps, .tdc_sat, .pd_a1, .pd_a2
  );

  dco u_dco (
    .msb(dco_msb), .lsb(dco_lsb), .cells, .dac, .bias(dco_bias),
    .lo2(lo2_clk), .car(car_clk), .car_lb(car_lb_clk), .amp_ok
  );

  tdc_vernier u_tdc (
    .ref_in(ref_clk), .sig_in(div_clk), .gx(tdc_gx), .gy(tdc_gy),
    .therm, .cal_cmp
  );

endmodule
