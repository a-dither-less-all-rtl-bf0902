// mmd: multi-modulus divider clocked by the DCO/2 clock.
//
// Divides clk_in by the programmable ratio N (2..2^W-1).  The divided edge
// (rising edge of div_out) is the signal edge measured by the TDC.  The
// document gives the function only; the counter structure is this design's.
// The ratio comes from the reference-clock domain and changes right after a
// reference edge, i.e. next to a divided edge.  To sample it while it is
// stable the divider captures it at mid-cycle (falling edge of div_out) and
// applies it from the next divided edge on: a ratio written after divided
// edge k governs the interval between edges k+1 and k+2.
`timescale 1ps/1fs
module mmd #(
  parameter int W = 8
) (
  input  logic         clk_in,   // DCO/2
  input  logic         rst_n,
  input  logic [W-1:0] ratio,    // quasi-static, from the reference domain
  output logic         div_out
);

  logic [W-1:0] cnt;      // counts down to 0; wrap = divided rising edge
  logic [W-1:0] n_cur;    // modulus of the running cycle
  logic [W-1:0] n_next;   // captured at mid-cycle

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      n_cur   <= W'(4);
      n_next  <= W'(4);
      div_out <= 1'b0;
    end else begin
      if (cnt == '0) begin
        // a modulus below 2 can only come from an unset register
        cnt     <= (n_next < W'(2)) ? W'(1) : n_next - W'(1);
        n_cur   <= (n_next < W'(2)) ? W'(2) : n_next;
        div_out <= 1'b1;
      end else begin
        cnt <= cnt - W'(1);
        if (cnt == (n_cur >> 1)) begin
          div_out <= 1'b0;
          n_next  <= (ratio < W'(2)) ? W'(2) : ratio;
        end
      end
    end
  end

endmodule
