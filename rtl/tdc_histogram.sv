// tdc_histogram: code-density (histogram) collector for the foreground TDC
// linearity calibration.
//
// The TDC thresholds are identified with the histogram method of ADC
// testing: while the TDC input is spread evenly over a range, the number of
// hits of each code is proportional to the width of its bin, and the running
// sum of the hits, scaled by the input range, locates each threshold.  On
// start this block clears its counters, counts the codes of the next
// 2^N_LOG2 reference cycles and then forms the cumulative histogram, one bin
// per cycle:
//     count[k] = number of samples with code k
//     cum[k]   = number of samples with code < k   (cum[0] = 0)
// so the threshold between codes k-1 and k lies at cum[k] / 2^N_LOG2 of the
// swept range.  Both tables are read through rd_addr (combinational read).
// The stimulus (in the loop: the sweep of the divided edge over one DCO/2
// period that a fractional channel produces) and the later least-squares fit
// of the X and Y line delays are outside this block.
//
// Timing: done is a one-cycle pulse 1 + 2^N_LOG2 + BINS cycles after start;
// busy is high in between.  The tables hold their values until the next start.
`timescale 1ps/1fs
module tdc_histogram
  import adpll_pkg::*;
#(
  parameter int W      = TDC_W,
  parameter int BINS   = TDC_LEVELS + 1,
  parameter int N_LOG2 = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [W-1:0]      code,
  input  logic [W-1:0]      rd_addr,
  output logic [N_LOG2:0]   rd_count,
  output logic [N_LOG2:0]   rd_cum,
  output logic              busy,
  output logic              done
);

  typedef enum logic [1:0] {H_IDLE, H_COUNT, H_SUM} hist_state_e;
  hist_state_e st;

  logic [N_LOG2:0] count [BINS];
  logic [N_LOG2:0] cum   [BINS];
  logic [N_LOG2:0] n;        // samples taken
  logic [W-1:0]    k;        // bin being summed
  logic [N_LOG2:0] run;      // running sum of count[0..k-1]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= H_IDLE;
      n    <= '0;
      k    <= '0;
      run  <= '0;
      done <= 1'b0;
      for (int i = 0; i < BINS; i++) begin
        count[i] <= '0;
        cum[i]   <= '0;
      end
    end else begin
      done <= 1'b0;
      case (st)
        H_IDLE: begin
          if (start) begin
            for (int i = 0; i < BINS; i++) count[i] <= '0;
            n  <= '0;
            st <= H_COUNT;
          end
        end
        H_COUNT: begin
          if (int'(code) < BINS) count[code] <= count[code] + 1'b1;
          n <= n + 1'b1;
          if (n == (N_LOG2+1)'((1 << N_LOG2) - 1)) begin
            k   <= '0;
            run <= '0;
            st  <= H_SUM;
          end
        end
        H_SUM: begin
          cum[k] <= run;
          run    <= run + count[k];
          k      <= k + 1'b1;
          if (int'(k) == BINS - 1) begin
            done <= 1'b1;
            st   <= H_IDLE;
          end
        end
        default: st <= H_IDLE;
      endcase
    end
  end

  assign busy     = (st != H_IDLE);
  assign rd_count = (int'(rd_addr) < BINS) ? count[rd_addr] : '0;
  assign rd_cum   = (int'(rd_addr) < BINS) ? cum[rd_addr]   : '0;

endmodule
