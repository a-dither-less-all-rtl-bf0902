// dco: behavioural model of the capacitively degenerated LC-tank DCO with its
// /2 and /4 output dividers (analog block; not synthesizable).
//
// Frequency = F_MIN + MSB_STEP*msb + LSB_STEP*lsb (coarse banks, 7 + 6 bits,
// a larger code removes capacitance) + fine(u) - FINE_RANGE, where u is the
// fine setting (255 thermometer cells plus a 4-bit DAC cell, 0..4095)/4096
// and fine(u) = FINE_RANGE*(A*u + (1-A)*u^2).  The fine curve is convex like
// the measured characteristic of the document (8.44 MHz range, about 2 kHz per
// step at 7.26 GHz); A and the bank steps are this model's values.  The tuning
// range of 5.8 to 8.1 GHz is the document's.  The oscillator runs only with
// bias >= BIAS_START; amp_ok reports a swing above target, with the swing
// modelled as bias * f / 7.2 GHz against AMP_TH.
// Outputs: lo2 = DCO/2 (divider input), car = DCO/4 (1.8 GHz band carrier,
// RF counter), car_lb = DCO/8 (900 MHz band).  Edges are placed on an exact
// real-valued time grid so the average frequency is not quantized by the
// simulator time step.
`timescale 1ps/1fs
module dco
  import adpll_pkg::*;
#(
  parameter real F_MIN      = 5.8e9,
  parameter real MSB_STEP   = 18.0e6,
  parameter real LSB_STEP   = 0.3e6,
  parameter real FINE_RANGE = 8.44e6,
  parameter real A          = 0.45,
  parameter real F_OFS      = 0.0,
  parameter int  BIAS_START = 4,
  parameter real AMP_TH     = 12.0
) (
  input  logic [MSB_BANK_W-1:0]  msb,
  input  logic [LSB_BANK_W-1:0]  lsb,
  input  logic [FINE_CELLS-1:0]  cells,
  input  logic [FINE_DAC_W-1:0]  dac,
  input  logic [BIAS_W-1:0]      bias,
  output logic                   lo2,
  output logic                   car,
  output logic                   car_lb,
  output logic                   amp_ok
);

  function automatic real freq_hz();
    int  n;
    real u;
    n = 0;
    for (int i = 0; i < FINE_CELLS; i++) n += int'(cells[i]);
    u = (real'(n) * 16.0 + real'(dac)) / 4096.0;
    return F_MIN + F_OFS + MSB_STEP * real'(msb) + LSB_STEP * real'(lsb)
           + FINE_RANGE * (A * u + (1.0 - A) * u * u) - FINE_RANGE;
  endfunction

  real t_next;

  initial begin
    lo2    = 1'b0;
    car    = 1'b0;
    car_lb = 1'b0;
    t_next = 0.0;
  end

  always_comb amp_ok = (real'(bias) * freq_hz() / 7.2e9) >= AMP_TH;

  always begin
    if (int'(bias) < BIAS_START) begin
      #(1000.0);
      t_next = $realtime;
    end else begin
      t_next = t_next + 1.0e12 / freq_hz();   // half period of lo2 = DCO period
      #(t_next - $realtime);
      lo2 = ~lo2;
      if (lo2) begin
        car = ~car;
        if (car) car_lb = ~car_lb;
      end
    end
  end

endmodule
