// Self-checking testbench of dco_cal with a loop model: the loop-filter
// word follows w0 + k1*ofs + k2*ofs^2 of the imposed FCW shift through a
// first-order lag, plus +/-1 LSB noise.  Checks the imposed shifts, the
// extracted a1 = k1*2^16 and a2 = k2*2^32, busy/done and the total time.
`timescale 1ps/1fs
module tb_dco_cal;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 1, start;
  logic [FINE_W-1:0] word;
  logic signed [15:0] fcw_ofs;
  logic signed [23:0] a1, a2;
  logic busy, done;
  int checks = 0, failures = 0;
  real wf, k1, k2;
  int seen_m = 0, seen_p = 0;

  dco_cal dut (.clk, .rst_n, .start, .word, .fcw_ofs, .a1, .a2, .busy, .done);

  always #19231 clk = ~clk;
  initial begin #2_000_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    real tgt;
    tgt = 2000.0 + k1 * real'(fcw_ofs) + k2 * real'(fcw_ofs) * real'(fcw_ofs);
    wf = wf + (tgt - wf) / 20.0;
    word <= FINE_W'($rtoi(wf + real'($urandom_range(0, 2)) - 1.0));
    if (fcw_ofs == -16'sd512) seen_m++;
    if (fcw_ofs == 16'sd512) seen_p++;
  end

  initial begin
    int t;
    real ea1, ea2;
    start = 0; wf = 2000.0; word = 12'd2000;
    #1 rst_n = 0; #1000 rst_n = 1;
    check(fcw_ofs == 0 && !busy, "idle after reset");
    for (int k = 0; k < 3; k++) begin
      k1 = (k == 0) ? 0.37 : (k == 1) ? 0.30 : 0.45;
      k2 = (k == 0) ? -1.0e-4 : (k == 1) ? -2.0e-5 : 5.0e-5;
      seen_m = 0; seen_p = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      t = 0;
      while (!done && t < 3000) begin @(posedge clk); t++; end
      ea1 = k1 * 65536.0; ea2 = k2 * 4294967296.0;
      $display("k1=%f k2=%g: a1=%0d (%f) a2=%0d (%f), %0d cycles", k1, k2, a1, ea1, a2, ea2, t);
      check(done && !busy && fcw_ofs == 0, "finished with the shift removed");
      check(seen_m > 250 && seen_p > 250, "both frequency shifts imposed");
      check(real'(a1) > ea1 * 0.98 && real'(a1) < ea1 * 1.02, "a1 within 2 %");
      check((real'(a2) - ea2) < 0.1 * 429497.0 + 2048.0 && (ea2 - real'(a2)) < 0.1 * 429497.0 + 2048.0,
            "a2 within 10 % of its largest value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
