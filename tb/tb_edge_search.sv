// Self-checking testbench of edge_search with a phase model: the divided
// edge sits x ps after the reference edge; each ratio step moves it by one
// DCO/2 period (278 ps) LAT cycles later; the TDC saturates outside
// -45..545 ps.  Checks that the search ends inside the linear range, that
// it stays there and that the step count matches the start offset.
`timescale 1ps/1fs
module tb_edge_search;
  localparam int LAT = 3;
  logic clk = 0, rst_n = 1, start;
  logic sat_low, sat_high;
  logic signed [1:0] adj;
  logic done;
  logic [9:0] steps;
  int checks = 0, failures = 0;
  real x;
  int q [LAT];

  edge_search #(.LAT(LAT)) dut (.clk, .rst_n, .start, .sat_low, .sat_high, .adj, .done, .steps);

  always #19231 clk = ~clk;
  initial begin #2_000_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always_comb begin
    sat_high = (x > 545.0);
    sat_low  = (x < -45.0);
  end
  always @(posedge clk) begin
    x = x + 278.0 * real'(q[LAT-1]);
    for (int i = LAT - 1; i > 0; i--) q[i] = q[i-1];
    q[0] = int'(adj);
  end

  initial begin
    int t, bad;
    real x0;
    start = 0; x = 0.0;
    foreach (q[i]) q[i] = 0;
    #1 rst_n = 0; #1000 rst_n = 1;
    check(adj == 0 && !done, "idle after reset");
    for (int k = 0; k < 8; k++) begin
      x0 = (k == 0) ? 9000.0 : (k == 1) ? -7000.0 : (k == 2) ? 300.0 :
           real'($urandom_range(0, 30000)) - 15000.0;
      @(negedge clk); x = x0; start = 1; @(negedge clk); start = 0;
      t = 0;
      while (!done && t < 500) begin @(posedge clk); t++; end
      check(done, "search finished");
      repeat (LAT + 1) @(posedge clk);
      bad = 0;
      repeat (20) begin @(posedge clk); #1; if (sat_high || sat_low || adj != 0) bad++; end
      check(bad == 0, $sformatf("linear and quiet after the search (start %f ps, end %f ps)", x0, x));
      check(x >= -45.0 && x <= 545.0, "edge inside the TDC range");
      check(int'(steps) >= int'($floor((x0 > 0 ? x0 - 545.0 : -45.0 - x0) / 278.0)) &&
            int'(steps) <= int'($floor((x0 > 0 ? x0 - 545.0 : -45.0 - x0) / 278.0)) + LAT + 2 ||
            (x0 >= -45.0 && x0 <= 545.0 && steps == 0),
            $sformatf("step count %0d plausible", steps));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
