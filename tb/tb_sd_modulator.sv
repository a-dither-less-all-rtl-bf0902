// Self-checking testbench of sd_modulator: compares ratio and residue with
// a first-order accumulator model for random fractional words and edge-search
// adjustments, and checks that the mean ratio equals the FCW.
`timescale 1ps/1fs
module tb_sd_modulator;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 1, en;
  logic [FCW_INT_W+FCW_FRAC_W-1:0] fcw;
  logic signed [1:0] es_adj;
  logic [FCW_INT_W-1:0] ratio;
  logic [FCW_FRAC_W-1:0] residue;
  int checks = 0, failures = 0;

  sd_modulator dut (.clk, .rst_n, .en, .fcw, .es_adj, .ratio, .residue);

  always #500 clk = ~clk;
  initial begin #100_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint acc, sum_r, n;
    int exp_ratio, bad;
    en = 0; fcw = 24'd9074215; es_adj = 0;
    #1 rst_n = 0; #1000 rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      fcw = (k == 0) ? 24'd9074215 : 24'(($urandom_range(100, 200) << 16) | $urandom_range(0, 65535));
      @(negedge clk); en = 1;
      acc = longint'(residue); sum_r = 0; n = 0; bad = 0;
      for (int i = 0; i < 4096; i++) begin
        es_adj = (i % 97 == 5) ? 2'sd1 : (i % 97 == 50) ? -2'sd1 : 2'sd0;
        @(posedge clk);
        acc = acc + longint'(fcw[15:0]);
        exp_ratio = int'(fcw[23:16]) + int'(acc >> 16) + int'(es_adj);
        acc = acc & 65535;
        #1;
        if (int'(ratio) != exp_ratio || longint'(residue) != acc) bad++;
        sum_r += longint'(ratio) - longint'(es_adj);
        n++;
        @(negedge clk);
      end
      check(bad == 0, $sformatf("ratio/residue match the model (%0d mismatches)", bad));
      check((real'(sum_r) / n - real'(fcw) / 65536.0) < 0.001 &&
            (real'(fcw) / 65536.0 - real'(sum_r) / n) < 0.001, "mean ratio equals FCW");
      es_adj = 0;
    end
    en = 0;
    begin
      logic [7:0] r0; r0 = ratio;
      repeat (10) @(posedge clk);
      check(ratio == r0, "en=0 holds the ratio");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
