// Self-checking testbench of rf_counter: an RF clock with a fractional
// number of periods per reference cycle; each delta must be the floor or
// ceiling of the ratio and the sum over many cycles must equal the edges
// actually produced.
`timescale 1ps/1fs
module tb_rf_counter;
  logic rf_clk = 0, ref_clk = 0, rst_n = 1;
  logic [11:0] delta;
  logic valid;
  int checks = 0, failures = 0;
  real rf_half;
  longint rf_edges = 0;

  rf_counter dut (.rf_clk, .ref_clk, .rst_n, .delta, .valid);

  always #19231 ref_clk = ~ref_clk;
  initial forever begin #(rf_half) rf_clk = ~rf_clk; end
  always @(posedge rf_clk) rf_edges++;
  initial begin #500_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real ratio;
    longint sum, e0, e1;
    int bad, nvalid;
    rf_half = 277.7;
    #1 rst_n = 0; #1000 rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      rf_half = (k == 0) ? 277.7 : (k == 1) ? 250.3 : 311.1;
      ratio = 38462.0 / (2.0 * rf_half);
      repeat (10) @(posedge ref_clk);
      @(negedge ref_clk);
      sum = 0; bad = 0; nvalid = 0;
      repeat (200) begin
        @(posedge ref_clk); #1;
        if (valid) begin
          nvalid++;
          sum += longint'(delta);
          if (real'(delta) < ratio - 1.01 || real'(delta) > ratio + 1.01) bad++;
        end
      end
      check(nvalid == 200, "valid every reference cycle");
      check(bad == 0, $sformatf("each delta within 1 of %f", ratio));
      check(real'(sum) > 200.0 * ratio - 3.0 && real'(sum) < 200.0 * ratio + 3.0,
            $sformatf("sum %0d over 200 cycles, expected %f", sum, 200.0 * ratio));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
