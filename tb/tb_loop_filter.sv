// Self-checking testbench of loop_filter against a real-valued PI model:
// random phase errors with every gear, gear changes with output continuity
// (I' = I + (Kp_old - Kp_new) e), load of an initial word, rail clamping.
`timescale 1ps/1fs
module tb_loop_filter;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 1, en, load;
  logic [FINE_W-1:0] init_word, word, word_prev;
  logic signed [15:0] e;
  logic [1:0] gear;
  gear_t [NGEARS-1:0] gears;
  int checks = 0, failures = 0;

  loop_filter dut (.clk, .rst_n, .en, .load, .init_word, .e, .gear, .gears, .word, .word_prev);

  always #500 clk = ~clk;
  initial begin #100_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real integ, y;
  int g_q;
  function automatic real p2(input int sh); return 2.0 ** sh; endfunction

  initial begin
    int bad, wexp, jump_max, wp;
    real ev, pn, po;
    en = 0; load = 0; init_word = '0; e = '0; gear = 0;
    gears[0] = '{kp_sh: 5'sd6, ki_sh: 5'sd2};
    gears[1] = '{kp_sh: 5'sd5, ki_sh: 5'sd0};
    gears[2] = '{kp_sh: 5'sd4, ki_sh: -5'sd2};
    gears[3] = '{kp_sh: 5'sd3, ki_sh: -5'sd4};
    #1 rst_n = 0; #1000 rst_n = 1;
    check(int'(word) == 2048, "mid word after reset");
    @(negedge clk); init_word = 12'd1500; load = 1;
    @(negedge clk); load = 0;
    check(int'(word) == 1500 && int'(word_prev) == 1500, "load sets the word");
    integ = 1500.0; g_q = 0; bad = 0; jump_max = 0;
    en = 1;
    for (int n = 0; n < 2000; n++) begin
      gear = 2'(n / 500);
      e = 16'(int'($urandom_range(0, 64)) - 32);
      ev = real'(e) / 16.0;
      pn = ev * p2(gears[gear].kp_sh);
      po = ev * p2(gears[g_q].kp_sh);
      integ = integ + ev * p2(gears[gear].ki_sh) + ((gear != g_q) ? (po - pn) : 0.0);
      y = integ + pn;
      wp = int'(word);
      @(posedge clk); #1;
      wexp = int'($floor(y));
      if (wexp - int'(word) > 1 || int'(word) - wexp > 1) begin
        bad++;
        if (bad < 5) $display("n=%0d gear %0d word %0d model %f", n, gear, word, y);
      end
      if (gear != g_q) begin
        // continuity: the jump at a gear change is only P(new) - P(old) of the same e
        // plus one integrator step, no larger than without the change
        if ((int'(word) - wp) > jump_max) jump_max = int'(word) - wp;
      end
      g_q = gear;
      @(negedge clk);
    end
    check(bad == 0, $sformatf("word follows the PI model (%0d mismatches)", bad));
    // continuity test: constant e, gear 0 -> 1, the output must not step
    @(negedge clk); init_word = 12'd2000; load = 1; gear = 0; e = 16'sd0;
    @(negedge clk); load = 0; e = 16'sd16;
    @(posedge clk); #1 wp = int'(word);
    check(wp == 2000 + 64 + 4, "P and I steps of gear 0");
    @(negedge clk); gear = 1;
    @(posedge clk); #1;
    check(int'(word) - wp == 1, $sformatf("gear change keeps the output continuous (step %0d)", int'(word) - wp));
    // clamps
    e = 16'sd30000; gear = 0;
    repeat (5) @(posedge clk); #1;
    check(word == '1, "upper rail");
    e = -16'sd30000;
    repeat (5) @(posedge clk); #1;
    check(word == '0, "lower rail");
    en = 0; e = 16'sd100;
    repeat (5) @(posedge clk); #1;
    check(word == '0, "en=0 holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
