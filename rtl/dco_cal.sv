// dco_cal: foreground calibration of the DCO fine-tuning characteristic.
//
// The document computes the predistortion polynomial by imposing known
// frequency shifts through the sigma-delta modulator and measuring how the
// DCO control word of the locked loop moves; it uses a second-order fit and the
// step takes 17 us.  This block imposes -F, 0 and +F (F = 2^F_LOG2 FCW LSBs),
// waits SETTLE cycles after each change, sums the loop's fine word over
// 2^AVG_LOG2 cycles (S-, S0, S+) and computes
//     a1 = (S+ - S-) / (2F * 2^AVG)          (Q.16)
//     a2 = (S+ + S- - 2*S0) / (2F^2 * 2^AVG) (Q.32)
// i.e. the parabola through the three points.  The three-point scheme,
// F, SETTLE and AVG are this design's choices.  The defaults take
// 3 x (256+32) + 64 = 928 reference cycles = 35.7 us at 26 MHz, about twice
// the 17 us of the document: SETTLE is sized to let the loop, at its final
// bandwidth, settle after each shift (with SETTLE = 112 the measured a1 came
// out about 20 % high and a2 far too small).  Outputs hold their value until
// the next start.
`timescale 1ps/1fs
module dco_cal
  import adpll_pkg::*;
#(
  parameter int F_LOG2   = 9,
  parameter int SETTLE   = 256,
  parameter int RETURN   = 64,
  parameter int AVG_LOG2 = 5,
  parameter int CW       = 24,
  parameter int MW       = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [FINE_W-1:0]    word,      // loop-filter output
  output logic signed [MW-1:0] fcw_ofs,   // imposed frequency shift
  output logic signed [CW-1:0] a1,
  output logic signed [CW-1:0] a2,
  output logic                 busy,
  output logic                 done
);

  localparam int SH1 = 16 - AVG_LOG2 - 1 - F_LOG2;
  localparam int SH2 = 32 - AVG_LOG2 - 1 - 2 * F_LOG2;
  localparam int SW  = FINE_W + AVG_LOG2 + 2;

  typedef enum logic [2:0] {C_IDLE, C_SETTLE, C_SUM, C_CALC, C_RETURN} cal_state_e;
  cal_state_e          st;
  logic [1:0]          pt;         // 0: -F, 1: 0, 2: +F
  logic [8:0]          cnt;
  logic signed [SW-1:0] acc, s_m, s_0, s_p;
  logic signed [SW+1:0] d1, d2;

  function automatic logic signed [CW-1:0] cshift(input logic signed [SW+1:0] v, input int sh);
    logic signed [CW+SW:0] w;
    w = (CW+SW+1)'(v);
    if (sh >= 0) return CW'(w <<< sh);
    else         return CW'(w >>> (-sh));
  endfunction

  always_comb begin
    unique case (pt)
      2'd0:    fcw_ofs = -MW'(1 << F_LOG2);
      2'd2:    fcw_ofs = MW'(1 << F_LOG2);
      default: fcw_ofs = '0;
    endcase
    if (!busy) fcw_ofs = '0;
    d1 = (SW+2)'(s_p) - (SW+2)'(s_m);
    d2 = (SW+2)'(s_p) + (SW+2)'(s_m) - ((SW+2)'(s_0) <<< 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= C_IDLE;
      pt   <= '0;
      cnt  <= '0;
      acc  <= '0;
      s_m  <= '0;
      s_0  <= '0;
      s_p  <= '0;
      a1   <= '0;
      a2   <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      case (st)
        C_IDLE: if (start) begin
          st   <= C_SETTLE;
          pt   <= 2'd0;
          cnt  <= '0;
          busy <= 1'b1;
          done <= 1'b0;
        end
        C_SETTLE: begin
          cnt <= cnt + 9'd1;
          if (int'(cnt) == SETTLE - 1) begin
            st  <= C_SUM;
            cnt <= '0;
            acc <= '0;
          end
        end
        C_SUM: begin
          acc <= acc + SW'(word);
          cnt <= cnt + 9'd1;
          if (int'(cnt) == (1 << AVG_LOG2) - 1) begin
            unique case (pt)
              2'd0:    s_m <= acc + SW'(word);
              2'd1:    s_0 <= acc + SW'(word);
              default: s_p <= acc + SW'(word);
            endcase
            cnt <= '0;
            if (pt == 2'd2) st <= C_CALC;
            else begin
              pt <= pt + 2'd1;
              st <= C_SETTLE;
            end
          end
        end
        C_CALC: begin
          a1   <= cshift(d1, SH1);
          a2   <= cshift(d2, SH2);
          st   <= C_RETURN;
          pt   <= 2'd1;
          cnt  <= '0;
        end
        // shift removed: let the loop settle before handing over
        C_RETURN: begin
          cnt <= cnt + 9'd1;
          if (int'(cnt) == RETURN - 1) begin
            st   <= C_IDLE;
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
