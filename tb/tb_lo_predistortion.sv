// Self-checking testbench of lo_predistortion: random modulation words and
// coefficients, checks d = floor((a1*m*2^16 + a2*m^2) / 2^32), one cycle
// later, saturated to 14 bits, and d = 0 when disabled.
`timescale 1ps/1fs
module tb_lo_predistortion;
  logic clk = 0, rst_n = 1, en;
  logic signed [15:0] m;
  logic signed [23:0] a1, a2;
  logic signed [13:0] d;
  int checks = 0, failures = 0;

  lo_predistortion dut (.clk, .rst_n, .en, .m, .a1, .a2, .d);

  always #500 clk = ~clk;
  initial begin #10_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint ex;
    en = 0; m = '0; a1 = '0; a2 = '0;
    #1 rst_n = 0; #1000 rst_n = 1;
    en = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      m  = 16'(int'($urandom_range(0, 16383)) - 8192);
      a1 = 24'(int'($urandom_range(18000, 30000)));
      a2 = 24'(-int'($urandom_range(0, 2000000)));
      en = (n % 50 != 7);
      ex = ((longint'(a1) * longint'(m)) * 65536 + longint'(a2) * longint'(m) * longint'(m)) >>> 32;
      if (ex > 8191) ex = 8191;
      if (ex < -8192) ex = -8192;
      if (!en) ex = 0;
      @(posedge clk); #1;
      check(longint'(d) == ex, $sformatf("m=%0d a1=%0d a2=%0d: d=%0d expected %0d", m, a1, a2, d, ex));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
