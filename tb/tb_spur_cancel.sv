// Self-checking testbench of spur_cancel: random corrected TDC codes,
// residues and digital gains; checks e = Gd*(code - setpoint) + K0*residue
// with the residue delayed by DLY cycles, and the centred residue output.
`timescale 1ps/1fs
module tb_spur_cancel;
  import adpll_pkg::*;
  localparam int DLY = 4;
  logic clk = 0, rst_n = 1;
  logic signed [TDC_W+TDC_FB:0] code_corr;
  logic [FCW_FRAC_W-1:0] residue;
  logic [17:0] gd;
  logic signed [15:0] e;
  logic signed [FCW_FRAC_W:0] res_c;
  longint hist [DLY+1];
  int checks = 0, failures = 0;

  spur_cancel dut (.clk, .rst_n, .code_corr, .residue, .gd, .e, .res_c);

  always #500 clk = ~clk;
  initial begin #10_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint d, ge, ke, exp_e, exp_r;
    code_corr = '0; residue = '0; gd = 18'd16384;
    foreach (hist[i]) hist[i] = 0;
    #1 rst_n = 0; #1000 rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      code_corr = (TDC_W+TDC_FB+1)'($urandom_range(60 * 16, 120 * 16));
      gd = 18'($urandom_range(14000, 19000));
      #1;
      d = longint'(code_corr) - 90 * 16;
      ge = (d * longint'(gd)) >>> 14;
      ke = (hist[DLY-1] * 14222) >>> (16 + 8 - 4);
      exp_e = ge + ke;
      exp_r = hist[DLY-1] - 32768;
      if (exp_e > -32768 && exp_e < 32767) begin
        check(longint'(e) == exp_e, $sformatf("e %0d expected %0d", e, exp_e));
        check(longint'(res_c) == exp_r, "res_c");
      end
      @(posedge clk);
      for (int i = DLY - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = longint'(residue);
      #1 residue = FCW_FRAC_W'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
