// edge_search: brings the divided edge inside the narrow TDC range.
//
// The TDC is linear only over about one DCO/2 period (590 ps of a 38 ns
// reference period).  While the FLL holds the frequency, this block lowers
// the divider ratio by one in every reference cycle in which the TDC is
// saturated high (divided edge lagging), so that the next divided edge comes
// one DCO/2 period earlier, and raises it by one when the TDC is saturated
// low: a linear search, as in the document.  (The document's text pairs
// lagging with +1; its locking plot shows the ratio going down during the
// search, and only the pairing used here moves the edge toward the range.)  The effect of a ratio change reaches the TDC
// code LAT cycles later, so when the first linear code is seen, LAT further
// steps are already on their way; this design then takes back the steps
// that were in flight, so that the edge returns to the position that was seen
// inside the range (the undo is this design's choice).  `done` rises when the
// search has finished; `steps` counts the ratio changes.
`timescale 1ps/1fs
module edge_search #(
  parameter int LAT = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,     // one-cycle pulse
  input  logic              sat_low,
  input  logic              sat_high,
  output logic signed [1:0] adj,       // ratio adjustment for this cycle
  output logic              done,
  output logic [9:0]        steps
);

  typedef enum logic [1:0] {S_IDLE, S_SEARCH, S_UNDO, S_DONE} es_state_e;
  es_state_e          st;
  logic signed [1:0]  hist [LAT];
  logic [3:0]         undo_cnt;
  logic signed [1:0]  undo_dir;
  logic [3:0]         inflight;
  logic signed [1:0]  last_dir;

  always_comb begin
    inflight = '0;
    last_dir = 2'sd0;
    for (int i = 0; i < LAT; i++)
      if (hist[i] != 2'sd0) begin
        inflight = inflight + 4'd1;
        last_dir = hist[i];
      end
    adj = 2'sd0;
    case (st)
      S_SEARCH: if (sat_high)     adj = -2'sd1;
                else if (sat_low) adj = 2'sd1;
      S_UNDO:   adj = -undo_dir;
      default:  adj = 2'sd0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      undo_cnt <= '0;
      undo_dir <= 2'sd0;
      steps    <= '0;
      done     <= 1'b0;
      for (int i = 0; i < LAT; i++) hist[i] <= 2'sd0;
    end else begin
      hist[0] <= adj;
      for (int i = 1; i < LAT; i++) hist[i] <= hist[i-1];
      if (adj != 2'sd0 && st == S_SEARCH) steps <= steps + 10'd1;
      case (st)
        S_IDLE: if (start) begin
          st    <= S_SEARCH;
          done  <= 1'b0;
          steps <= '0;
        end
        S_SEARCH: if (!sat_high && !sat_low) begin
          if (inflight == '0) begin
            st   <= S_DONE;
            done <= 1'b1;
          end else begin
            st       <= S_UNDO;
            undo_cnt <= inflight;
            undo_dir <= last_dir;
          end
        end
        S_UNDO: begin
          undo_cnt <= undo_cnt - 4'd1;
          if (undo_cnt == 4'd1) begin
            st   <= S_DONE;
            done <= 1'b1;
          end
        end
        S_DONE: if (start) begin
          st    <= S_SEARCH;
          done  <= 1'b0;
          steps <= '0;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
