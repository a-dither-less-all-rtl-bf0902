// tb_tdc_histogram: self-checking test of the TDC code-density collector.
//
// Drives a deliberately uneven code distribution (a wide base plus a narrow
// peak and occasional out-of-range codes) from $urandom, keeps its own count
// of every code presented during the 2^N_LOG2 counting cycles, and after done
// compares every count and every cumulative entry (codes below k) with that
// model.  It checks the latency (done 2^N_LOG2 + BINS cycles after the cycle
// that takes start), that the codes presented after counting are ignored, and
// runs two collections to check the counters are cleared by start.
`timescale 1ns/1ps
module tb_tdc_histogram;
  import adpll_pkg::*;

  localparam int W      = TDC_W;
  localparam int BINS   = TDC_LEVELS + 1;
  localparam int N_LOG2 = HIST_LOG2;   // the default of the block

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [W-1:0] code = '0, rd_addr = '0;
  logic [N_LOG2:0] rd_count, rd_cum;
  logic busy, done;

  tdc_histogram dut (
    .clk, .rst_n, .start, .code, .rd_addr, .rd_count, .rd_cum, .busy, .done
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int ref_cnt [BINS];

  function automatic logic [W-1:0] draw(input int peak);
    int r;
    r = int'($urandom % 100);
    if (r < 3)  return W'(BINS + int'($urandom % (2 ** W - BINS)));  // out of range
    if (r < 30) return W'(peak + int'($urandom % 4));
    return W'(10 + int'($urandom % 60));
  endfunction

  task automatic collect(input int peak);
    int lat, acc;
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    @(negedge clk) start = 1'b1;
    @(posedge clk);                        // start taken here
    @(negedge clk) start = 1'b0;
    for (int i = 0; i < 2 ** N_LOG2; i++) begin
      if (i > 0) @(negedge clk);
      code = draw(peak);
      if (int'(code) < BINS) ref_cnt[code]++;
      @(posedge clk);
    end
    lat = 2 ** N_LOG2;
    check(busy, "busy while collecting");
    while (!done && lat < 2 ** N_LOG2 + 4 * BINS) begin
      @(negedge clk) code = draw(peak);     // must not be counted
      @(posedge clk);
      #1 lat++;
    end
    check(lat == 2 ** N_LOG2 + BINS, $sformatf("latency %0d cycles, expected %0d", lat, 2 ** N_LOG2 + BINS));
    @(negedge clk);
    check(!busy, "idle after done");
    acc = 0;
    for (int k = 0; k < BINS; k++) begin
      rd_addr = W'(k);
      #1;
      check(int'(rd_count) == ref_cnt[k], $sformatf("count[%0d] = %0d, expected %0d", k, rd_count, ref_cnt[k]));
      check(int'(rd_cum) == acc, $sformatf("cum[%0d] = %0d, expected %0d", k, rd_cum, acc));
      acc += ref_cnt[k];
    end
    rd_addr = W'(BINS);
    #1 check(rd_count == '0 && rd_cum == '0, "out-of-range read address returns 0");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    collect(40);
    collect(90);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10.0 * 20000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
