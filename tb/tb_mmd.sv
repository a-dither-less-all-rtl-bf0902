// Self-checking testbench of mmd: for a set of quasi-static ratios (and one
// ratio change in the middle of a division cycle) measures the number of
// input cycles between rising output edges.
`timescale 1ps/1fs
module tb_mmd;
  logic clk_in = 0, rst_n = 1;
  logic [7:0] ratio;
  logic div_out;
  int checks = 0, failures = 0;
  int cnt = 0, last = -1;

  mmd dut (.clk_in, .rst_n, .ratio, .div_out);

  always #139 clk_in = ~clk_in;
  initial begin #200_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk_in) cnt++;
  always @(posedge div_out) begin last = cnt; cnt = 0; end

  initial begin
    int r;
    ratio = 8'd138;
    #1 rst_n = 0; #1000 rst_n = 1;
    for (int k = 0; k < 12; k++) begin
      r = (k == 0) ? 138 : (k == 1) ? 139 : (k == 2) ? 137 : int'($urandom_range(40, 250));
      ratio = 8'(r);
      repeat (3) @(posedge div_out);   // the new ratio applies from the next wrap
      @(posedge div_out); #1;
      check(last == r, $sformatf("period %0d expected %0d", last, r));
      @(posedge div_out); #1;
      check(last == r, $sformatf("period %0d expected %0d", last, r));
    end
    // duty cycle: the output is high for about half the cycle
    begin
      int hi; hi = 0;
      ratio = 8'd140;
      repeat (3) @(posedge div_out);
      while (div_out) begin @(posedge clk_in); hi++; end
      check(hi >= 69 && hi <= 71, $sformatf("high time %0d of 140", hi));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
