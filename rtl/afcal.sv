// afcal: amplitude and frequency coarse calibration of the DCO (AFCAL).
//
// Runs before the loop is closed and centres the LC tank on the target so
// that the fine bank can cover the rest.  Starting from a powered-down
// oscillator it first raises the bias until the amplitude detector reports
// enough swing.  Then it alternates one amplitude step (bias -1 when the swing
// is enough, +1 otherwise) with one frequency step of a search over the 13-bit
// coarse code {MSB bank, LSB bank}: the RF counter is summed over 2^M_LOG2
// reference cycles and compared with FCW/2 per cycle; the code moves up (higher
// frequency) when the DCO is slow, down when it is fast.  As in the document,
// the search is a bisection whose step shrinks by a radix below 2 (here 1.6,
// step' = 5/8 step) so that a wrong decision can be recovered by later steps.
// The amplitude loop is frozen once the step is below AMP_FREEZE codes, when
// a capacitor change hardly affects the swing; from then on the bias may only
// be raised (when a late frequency step drops the swing below the threshold),
// so the oscillator ends on the safe side.  After the step reaches one
// code, EXTRA further unit steps are taken.  Radix, window and step counts are
// this design's choices.  A larger coarse code means less capacitance.
`timescale 1ps/1fs
module afcal
  import adpll_pkg::*;
#(
  parameter int CW          = 12,   // RF counter width
  parameter int M_LOG2      = 6,    // measurement window (cycles)
  parameter int SETTLE      = 4,    // cycles after a change
  parameter int STEP0       = 2560,
  parameter int AMP_FREEZE  = 64,
  parameter int EXTRA       = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [FCW_W-1:0]      fcw,
  input  logic [CW-1:0]         count,
  input  logic                  amp_ok,
  output logic [MSB_BANK_W-1:0] msb,
  output logic [LSB_BANK_W-1:0] lsb,
  output logic [BIAS_W-1:0]     bias,
  output logic                  busy,
  output logic                  done,
  output logic [5:0]            iters
);

  typedef enum logic [2:0] {A_IDLE, A_POWERUP, A_SETTLE, A_MEAS, A_STEP, A_DONE} af_state_e;
  af_state_e           st;
  logic [COARSE_W-1:0] code;
  logic [COARSE_W-1:0] step;
  logic [7:0]          cnt;
  logic [CW+M_LOG2-1:0] sum;
  logic [2:0]          extra_cnt;
  logic                amp_frozen;
  logic [FCW_W+M_LOG2-1:0] expect_q, meas_q;

  assign msb = code[COARSE_W-1:LSB_BANK_W];
  assign lsb = code[LSB_BANK_W-1:0];

  always_comb begin
    expect_q = (FCW_W+M_LOG2)'(fcw) << (M_LOG2 - 1);                // Q.16
    meas_q   = (FCW_W+M_LOG2)'(sum + (CW+M_LOG2)'(count)) << FCW_FRAC_W;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= A_IDLE;
      code       <= COARSE_W'(1 << (COARSE_W - 1));
      step       <= COARSE_W'(STEP0);
      bias       <= '0;
      cnt        <= '0;
      sum        <= '0;
      extra_cnt  <= '0;
      amp_frozen <= 1'b0;
      busy       <= 1'b0;
      done       <= 1'b0;
      iters      <= '0;
    end else begin
      case (st)
        A_IDLE: if (start) begin
          st         <= A_POWERUP;
          code       <= COARSE_W'(1 << (COARSE_W - 1));
          step       <= COARSE_W'(STEP0);
          bias       <= '0;
          cnt        <= '0;
          extra_cnt  <= '0;
          amp_frozen <= 1'b0;
          busy       <= 1'b1;
          done       <= 1'b0;
          iters      <= '0;
        end
        // cold start: raise the bias one step per SETTLE cycles
        A_POWERUP: begin
          cnt <= cnt + 8'd1;
          if (int'(cnt) == SETTLE - 1) begin
            cnt <= '0;
            if (amp_ok) st <= A_SETTLE;
            else if (bias != '1) bias <= bias + 1'b1;
          end
        end
        A_SETTLE: begin
          cnt <= cnt + 8'd1;
          if (int'(cnt) == SETTLE - 1) begin
            cnt <= '0;
            sum <= '0;
            st  <= A_MEAS;
          end
        end
        A_MEAS: begin
          sum <= sum + (CW+M_LOG2)'(count);
          cnt <= cnt + 8'd1;
          if (int'(cnt) == (1 << M_LOG2) - 1) begin
            cnt <= '0;
            st  <= A_STEP;
            // frequency decision on the complete window
            if (meas_q < expect_q) begin
              if (code <= '1 - step) code <= code + step;
              else                   code <= '1;
            end else begin
              if (code >= step) code <= code - step;
              else              code <= '0;
            end
          end
        end
        A_STEP: begin
          iters <= iters + 6'd1;
          // amplitude step, alternated with the frequency step
          if (!amp_frozen) begin
            if (amp_ok) begin
              if (bias != '0) bias <= bias - 1'b1;
            end else if (bias != '1) bias <= bias + 1'b1;
          end else if (!amp_ok && bias != '1) begin
            // frozen: only upward corrections, the fine steps may still
            // move the oscillator below the threshold
            bias <= bias + 1'b1;
          end
          if (step == COARSE_W'(1)) begin
            extra_cnt <= extra_cnt + 3'd1;
            if (int'(extra_cnt) == EXTRA) begin
              st   <= A_DONE;
              busy <= 1'b0;
              done <= 1'b1;
            end else st <= A_SETTLE;
          end else begin
            step <= ((step * 5) >> 3 == 0) ? COARSE_W'(1) : COARSE_W'((step * 5) >> 3);
            if (int'(step) < AMP_FREEZE && !amp_frozen) begin
              amp_frozen <= 1'b1;
              // leave the oscillator on the safe side of the threshold
              if (!amp_ok && bias != '1) bias <= bias + 1'b1;
              else                       bias <= bias;
            end
            st <= A_SETTLE;
          end
        end
        A_DONE: if (start) st <= A_IDLE;
        default: st <= A_IDLE;
      endcase
    end
  end

endmodule
