// tdc_vernier: behavioural model of the 2-D Vernier time-to-digital converter
// (analog block: delay lines and SR-latch comparator matrix; not synthesizable).
//
// Line X (reference, stage delay tau1 = 55 ps, 19 stages) and line Y (signal,
// tau2 = 50 ps, 11 stages) span a Vernier plane; the comparator at (x,y)
// reports whether the reference, delayed x*tau1, arrives before the signal,
// delayed y*tau2, i.e. whether dt = t_sig - t_ref > x*tau1 - y*tau2.  With
// tau1/tau2 = 11/10 the thresholds 5*(11x-10y) ps give 119 distinct levels
// with 5 ps spacing from -45 ps to +545 ps; the other comparators of the
// plane are dummies.  For each level k (-9..109) the model uses the one cell
// with 11x-10y = k.  Output bit i corresponds to level i-9.
// Line X is tuned by gx (gain; +1 shortens tau1 by GX_STEP) and line Y by gy
// (DLL; +1 lengthens tau2 by GY_STEP).  PX and PY model process spread.
// The DLL comparator (10,11) sees the reference on both lines:
// cal_cmp = (10*tau1 < 11*tau2), refreshed on the reference falling edge.
// Timing: for each reference rising edge the code is updated EVAL_PS later,
// using the latest divided edge no older than HALF_PS; if there is none the
// signal is lagging and the code saturates high.
// The document prints 19 stages for line X and 11 for line Y in its TDC
// figure, and the reverse in its text; the figure's numbering is followed
// here because only it agrees with the 10*tau1 = 11*tau2 ratio and the
// -45..545 ps range.
`timescale 1ps/1fs
module tdc_vernier
  import adpll_pkg::*;
#(
  parameter real TAU1_PS  = 55.0,
  parameter real TAU2_PS  = 50.0,
  parameter real PX       = 1.0,
  parameter real PY       = 1.0,
  parameter real GX_STEP  = 0.016,
  parameter real GY_STEP  = 0.01,
  parameter real EVAL_PS  = 700.0,
  parameter real HALF_PS  = 19000.0
) (
  input  logic                   ref_in,
  input  logic                   sig_in,
  input  logic [TDC_GX_W-1:0]    gx,
  input  logic [TDC_GY_W-1:0]    gy,
  output logic [TDC_LEVELS-1:0]  therm,
  output logic                   cal_cmp
);

  real t_sig = -1.0e9;
  real t_ref = 0.0;

  function automatic real tau1();
    return TAU1_PS * PX * (1.0 - GX_STEP * (real'(gx) - real'(1 << (TDC_GX_W - 1))));
  endfunction

  function automatic real tau2();
    return TAU2_PS * PY * (1.0 + GY_STEP * (real'(gy) - real'(1 << (TDC_GY_W - 1))));
  endfunction

  // Plane position (x,y) of level k: 11x - 10y = k, 1<=x<=19, 1<=y<=11.
  function automatic void cell_of(input int k, output int x, output int y);
    x = ((k % 10) + 10) % 10;
    if (x == 0) x = 10;
    y = (11 * x - k) / 10;
    if (y < 1) begin
      x = x + 10;
      y = y + 11;
    end
  endfunction

  initial begin
    therm   = '0;
    cal_cmp = 1'b0;
  end

  always @(posedge sig_in) t_sig = $realtime;

  always @(posedge ref_in) begin
    real dt, thr;
    int  x, y;
    t_ref = $realtime;
    #(EVAL_PS);
    if (t_sig >= t_ref - HALF_PS) dt = t_sig - t_ref;
    else                          dt = 1.0e9;
    for (int i = 0; i < TDC_LEVELS; i++) begin
      cell_of(i - 9, x, y);
      thr = real'(x) * tau1() - real'(y) * tau2();
      therm[i] = (dt > thr);
    end
  end

  always @(negedge ref_in) cal_cmp = (10.0 * tau1() < 11.0 * tau2());

endmodule
