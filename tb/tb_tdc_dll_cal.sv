// Self-checking testbench of tdc_dll_cal: the comparator is modelled as
// cmp = (cal_word > target), i.e. delay line Y too fast above the target.
// Checks the mid-scale start, convergence to the target, hold with en=0
// and that updates happen on the falling clock edge.
`timescale 1ps/1fs
module tb_tdc_dll_cal;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 1, en, cmp;
  logic [TDC_GY_W-1:0] cal_word;
  int target;
  int checks = 0, failures = 0;

  tdc_dll_cal dut (.clk, .rst_n, .en, .cmp, .cal_word);

  always #500 clk = ~clk;
  always_comb cmp = (int'(cal_word) > target);
  initial begin #50_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [TDC_GY_W-1:0] w;
    en = 0; target = 32;
    #1 rst_n = 0; #1000 rst_n = 1;
    check(int'(cal_word) == (1 << (TDC_GY_W - 1)), "mid scale after reset");
    en = 1;
    for (int k = 0; k < 4; k++) begin
      target = (k == 0) ? 12 : (k == 1) ? 50 : (k == 2) ? 63 : int'($urandom_range(5, 58));
      repeat (700) @(posedge clk);
      check(int'(cal_word) >= target && int'(cal_word) <= target + 1,
            $sformatf("word %0d settles at target %0d", cal_word, target));
    end
    // updates only on the falling edge
    target = 0;
    @(posedge clk); #1 w = cal_word;
    #400 check(cal_word == w, "no update before the falling edge");
    @(negedge clk); #1 check(cal_word <= w, "update at the falling edge");
    en = 0; w = cal_word;
    repeat (100) @(posedge clk);
    check(cal_word == w, "en=0 holds the word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
