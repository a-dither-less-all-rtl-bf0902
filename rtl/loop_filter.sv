// loop_filter: proportional-integral PLL loop filter with gear shifting.
//
// The phase detector (TDC) plus the integrating DCO and this PI filter form
// the type-II loop of the document.  y = I + Kp*e, I <- I + Ki*e, with Kp and
// Ki powers of two taken from a programmable table of NGEARS coefficient sets
// (the document: up to 4 gear-shift steps, bandwidth programmable from 1 MHz
// down to 50 kHz; the power-of-two gains are this design's choice).
// When the gear index changes the integrator is rewritten so that the output
// does not jump: I' = I + (Kp_old - Kp_new)*e, which is the document's rule of
// initial conditions that give output continuity.  `load` presets the
// integrator to `init_word` (hand-over from the FLL without a step).
// Formats: e has FB fractional bits (TDC LSB); I and y are Q12.12 DCO fine
// LSBs; the integrator is clamped to the fine range (anti-windup).
// Timing: word is registered, one cycle after e.
`timescale 1ps/1fs
module loop_filter
  import adpll_pkg::*;
#(
  parameter int EW = 16,
  parameter int FB = TDC_FB,
  parameter int OW = FINE_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      load,
  input  logic [OW-1:0]             init_word,
  input  logic signed [EW-1:0]      e,
  input  logic [1:0]                gear,
  input  gear_t [NGEARS-1:0]         gears,
  output logic [OW-1:0]             word,
  output logic [OW-1:0]             word_prev
);

  localparam int AF = 12;  // fraction bits of I and y
  localparam logic signed [47:0] IMAX = 48'((1 << OW) - 1) <<< AF;

  logic signed [47:0] integ, e_a, p_new, p_old, i_step, i_next, y;
  logic [1:0]         gear_q;

  always_comb begin
    e_a    = 48'(e) <<< (AF - FB);
    p_new  = sshift(e_a, gears[gear].kp_sh);
    p_old  = sshift(e_a, gears[gear_q].kp_sh);
    i_step = sshift(e_a, gears[gear].ki_sh);
    i_next = integ + i_step + ((gear != gear_q) ? (p_old - p_new) : 48'sd0);
    if (i_next < 0)         i_next = '0;
    else if (i_next > IMAX) i_next = IMAX;
    y = i_next + p_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ     <= 48'(1 << (OW - 1)) <<< AF;
      gear_q    <= '0;
      word      <= OW'(1 << (OW - 1));
      word_prev <= OW'(1 << (OW - 1));
    end else if (load) begin
      integ     <= 48'(init_word) <<< AF;
      gear_q    <= gear;
      word      <= init_word;
      word_prev <= init_word;
    end else if (en) begin
      integ     <= i_next;
      gear_q    <= gear;
      word_prev <= word;
      if (y < 0)                      word <= '0;
      else if ((y >>> AF) > (1 << OW) - 1) word <= '1;
      else                            word <= OW'(y >>> AF);
    end
  end

endmodule
