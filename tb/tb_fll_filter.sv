// Self-checking testbench of fll_filter in a closed loop with a linear DCO
// model (about 2 kHz per fine step) and an integer RF edge counter model.
// Checks that the FLL locks for several start offsets, that the final
// frequency error is small and that clr restarts it.
`timescale 1ps/1fs
module tb_fll_filter;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 1, en, clr;
  logic [FCW_W-1:0] fcw;
  logic [11:0] count;
  logic count_valid;
  logic [FINE_W-1:0] word;
  logic locked;
  int checks = 0, failures = 0;
  real f_off, acc;

  fll_filter dut (.clk, .rst_n, .en, .clr, .fcw, .count, .count_valid, .word, .locked);

  always #19231 clk = ~clk;
  initial begin #2_000_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real fdco();
    return 7.2e9 + f_off + (real'(word) - 2048.0) * 2060.0;
  endfunction

  // carrier = DCO/4 edges counted per reference cycle
  always @(posedge clk) begin
    real a0;
    a0 = acc;
    acc = acc + fdco() / 4.0 / 26.0e6;
    count <= 12'($floor(acc) - $floor(a0));
  end

  initial begin
    real n_err;
    int t;
    en = 0; clr = 0; count_valid = 1; acc = 0.3; count = '0;
    fcw = 24'($rtoi(7.2e9 / 2.0 / 26.0e6 * 65536.0));
    #1 rst_n = 0; #1000 rst_n = 1;
    check(int'(word) == 2048 && !locked, "mid word and unlocked after reset");
    for (int k = 0; k < 3; k++) begin
      f_off = (k == 0) ? 2.5e6 : (k == 1) ? -3.0e6 : 0.8e6;
      @(negedge clk); clr = 1; @(negedge clk); clr = 0; en = 1;
      #1 check(int'(word) == 2048 && !locked, "clr restarts the FLL");
      t = 0;
      while (!locked && t < 5000) begin @(posedge clk); t++; end
      check(locked, $sformatf("FLL locks (offset %f MHz) after %0d cycles", f_off / 1e6, t));
      repeat (300) @(posedge clk);
      n_err = 0.0;
      repeat (512) begin @(posedge clk); n_err += (fdco() - 7.2e9) / 1e3 / 512.0; end
      $display("offset %f MHz: word %0d, mean residual error %f kHz", f_off / 1e6, word, n_err);
      check(n_err < 250.0 && n_err > -250.0, "mean residual frequency error below 250 kHz (counter resolution)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
