// lock_ctrl: sequencer of the ADPLL locking process.
//
// Follows the order of the document (Fig. 9, Table I): AFCAL (coarse tank
// tuning), FLL (RF counter loop), edge search (divided edge into the TDC
// range, FLL still closed), PLL in wide band, gear shifts, DCO calibration,
// operation.  The first gear shift is triggered when the DCO control word
// changes by less than gs_thr for gs_hold consecutive cycles (steady state)
// without sitting at either end of its range;
// the following ones are time triggered after gs_int1 and gs_int2 cycles, as
// in the document.  last_gear sets how many shifts are made (at most 3 here:
// four coefficient sets; the document allows up to four steps).  Pulses
// start the sub-blocks; `gear` indexes the loop-filter coefficient table.
// The hold count and the interval registers are this design's choices.
`timescale 1ps/1fs
module lock_ctrl
  import adpll_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  adpll_cfg_t         cfg,
  input  logic               afcal_done,
  input  logic               fll_locked,
  input  logic               es_done,
  input  logic               dcocal_done,
  input  logic [FINE_W-1:0]  word,
  input  logic [FINE_W-1:0]  word_prev,
  output lock_state_e        state,
  output logic [1:0]         gear,
  output logic               afcal_start,
  output logic               fll_clr,
  output logic               es_start,
  output logic               lf_load,
  output logic               dcocal_start,
  output logic               locked
);

  logic [7:0]  cnt;
  logic [FINE_W:0] dw;

  assign dw = (word > word_prev) ? (FINE_W+1)'(word - word_prev)
                                 : (FINE_W+1)'(word_prev - word);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= ST_IDLE;
      gear         <= '0;
      cnt          <= '0;
      afcal_start  <= 1'b0;
      fll_clr      <= 1'b0;
      es_start     <= 1'b0;
      lf_load      <= 1'b0;
      dcocal_start <= 1'b0;
      locked       <= 1'b0;
    end else begin
      afcal_start  <= 1'b0;
      fll_clr      <= 1'b0;
      es_start     <= 1'b0;
      lf_load      <= 1'b0;
      dcocal_start <= 1'b0;
      case (state)
        ST_IDLE: if (start) begin
          state       <= ST_AFCAL;
          afcal_start <= 1'b1;
          gear        <= '0;
          locked      <= 1'b0;
        end
        ST_AFCAL: if (afcal_done && !afcal_start) begin
          state   <= ST_FLL;
          fll_clr <= 1'b1;
        end
        ST_FLL: if (fll_locked && !fll_clr) begin
          state    <= ST_EDGE;
          es_start <= 1'b1;
        end
        ST_EDGE: if (es_done && !es_start) begin
          state   <= ST_PLL;
          lf_load <= 1'b1;
          gear    <= '0;
          cnt     <= '0;
        end
        ST_PLL: begin
          if (gear == 2'd0) begin
            // first shift: steady state of the DCO input
            if (dw < (FINE_W+1)'(cfg.gs_thr) && word != '0 && word != '1)
              cnt <= cnt + 8'd1;
            else                              cnt <= '0;
            if (cnt >= cfg.gs_hold && !lf_load) begin
              cnt <= '0;
              if (cfg.last_gear == 2'd0) begin
                state        <= cfg.dcocal_en ? ST_DCOCAL : ST_OPER;
                dcocal_start <= cfg.dcocal_en;
                locked       <= !cfg.dcocal_en;
              end else gear <= 2'd1;
            end
          end else begin
            // following shifts: time triggered
            cnt <= cnt + 8'd1;
            if (cnt >= ((gear == 2'd1) ? cfg.gs_int1 : cfg.gs_int2)) begin
              cnt <= '0;
              if (gear == cfg.last_gear) begin
                state        <= cfg.dcocal_en ? ST_DCOCAL : ST_OPER;
                dcocal_start <= cfg.dcocal_en;
                locked       <= !cfg.dcocal_en;
              end else gear <= gear + 2'd1;
            end
          end
        end
        ST_DCOCAL: if (dcocal_done && !dcocal_start) begin
          state  <= ST_OPER;
          locked <= 1'b1;
        end
        ST_OPER: if (start) begin
          state       <= ST_AFCAL;
          afcal_start <= 1'b1;
          gear        <= '0;
          locked      <= 1'b0;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

endmodule
