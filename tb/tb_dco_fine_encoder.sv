// Self-checking testbench of dco_fine_encoder: every 12-bit word, checks a
// thermometer fill of word/16 unit cells and the 4-bit DAC word.
`timescale 1ps/1fs
module tb_dco_fine_encoder;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 1;
  logic [FINE_W-1:0] word;
  logic [FINE_CELLS-1:0] cells;
  logic [FINE_DAC_W-1:0] dac;
  int checks = 0, failures = 0;

  dco_fine_encoder dut (.clk, .rst_n, .word, .cells, .dac);

  always #500 clk = ~clk;
  initial begin #100_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int bad;
    logic [FINE_CELLS-1:0] expc;
    word = '0; bad = 0;
    #1 rst_n = 0; #1000 rst_n = 1;
    for (int w = 0; w < 4096; w++) begin
      @(negedge clk); word = FINE_W'(w);
      @(posedge clk); #1;
      expc = '0;
      for (int i = 0; i < w / 16; i++) expc[i] = 1'b1;
      if (cells != expc || int'(dac) != w % 16) bad++;
      if (w % 256 == 0 || w == 4095)
        check(cells == expc && int'(dac) == w % 16, $sformatf("word %0d", w));
    end
    check(bad == 0, $sformatf("all words encoded (%0d mismatches)", bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
