// Self-checking testbench of lock_ctrl: the sub-blocks are replaced by
// stubs that answer after fixed delays, the loop-filter word settles
// exponentially.  Checks the order of the states, the start pulses, the
// three gear shifts at their times, that the first shift waits for a
// steady word away from the rails, and the short path without gears and
// without DCO calibration.
`timescale 1ps/1fs
module tb_lock_ctrl;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 1, start;
  adpll_cfg_t cfg;
  logic afcal_done, fll_locked, es_done, dcocal_done;
  logic [FINE_W-1:0] word, word_prev;
  lock_state_e state;
  logic [1:0] gear;
  logic afcal_start, fll_clr, es_start, lf_load, dcocal_start, locked;
  int checks = 0, failures = 0;
  int cyc = 0, t_state [8], n_pulse [6], t_gear [4];
  real wf;
  bit rail;

  lock_ctrl dut (.clk, .rst_n, .start, .cfg, .afcal_done, .fll_locked, .es_done, .dcocal_done,
                 .word, .word_prev, .state, .gear, .afcal_start, .fll_clr, .es_start, .lf_load,
                 .dcocal_start, .locked);

  always #500 clk = ~clk;
  initial begin #100_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // stubs
  int t_af, t_fl, t_es, t_dc;
  lock_state_e st_q;
  always @(posedge clk) begin
    cyc++;
    if (state != st_q) t_state[int'(state)] = cyc;
    st_q = state;
    if (gear != 0 && t_gear[gear] == 0) t_gear[gear] = cyc;
    if (afcal_start) begin n_pulse[0]++; t_af = cyc; end
    if (fll_clr) begin n_pulse[1]++; t_fl = cyc; end
    if (es_start) begin n_pulse[2]++; t_es = cyc; end
    if (lf_load) begin n_pulse[3]++; wf = rail ? 0.0 : 3000.0; end
    if (dcocal_start) begin n_pulse[4]++; t_dc = cyc; end
    afcal_done  <= (state == ST_AFCAL) && (cyc - t_af > 30);
    fll_locked  <= (state == ST_FLL) && (cyc - t_fl > 20);
    es_done     <= (state == ST_EDGE) && (cyc - t_es > 10);
    dcocal_done <= (state == ST_DCOCAL) && (cyc - t_dc > 40);
    word_prev <= word;
    wf = rail ? 0.0 : wf + (2000.0 - wf) / 8.0;
    word <= FINE_W'($rtoi(wf));
  end

  task automatic run(output int t);
    foreach (t_state[i]) t_state[i] = 0;
    foreach (n_pulse[i]) n_pulse[i] = 0;
    foreach (t_gear[i]) t_gear[i] = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t = 0;
    while (!locked && t < 2000) begin @(posedge clk); t++; end
    repeat (2) @(posedge clk);
  endtask

  initial begin
    int t;
    cfg = '0;
    cfg.fcw = 24'd9074215; cfg.last_gear = 2'd3; cfg.gs_thr = 8'd16; cfg.gs_hold = 8'd16;
    cfg.gs_int1 = 8'd40; cfg.gs_int2 = 8'd51; cfg.dcocal_en = 1'b1;
    start = 0; wf = 2048.0; word = 12'd2048; word_prev = 12'd2048; rail = 0; st_q = ST_IDLE;
    afcal_done = 0; fll_locked = 0; es_done = 0; dcocal_done = 0;
    #1 rst_n = 0; #1000 rst_n = 1;
    check(state == ST_IDLE && !locked, "idle after reset");
    run(t);
    check(locked && state == ST_OPER, "full sequence reaches operation");
    $display("state times %p gears %p", t_state, t_gear);
    check(t_state[int'(ST_AFCAL)] < t_state[int'(ST_FLL)] && t_state[int'(ST_FLL)] < t_state[int'(ST_EDGE)] &&
          t_state[int'(ST_EDGE)] < t_state[int'(ST_PLL)] && t_state[int'(ST_PLL)] < t_state[int'(ST_DCOCAL)] &&
          t_state[int'(ST_DCOCAL)] < t_state[int'(ST_OPER)], "state order AFCAL FLL EDGE PLL DCOCAL OPER");
    check(n_pulse[0] == 1 && n_pulse[1] == 1 && n_pulse[2] == 1 && n_pulse[3] == 1 && n_pulse[4] == 1,
          "one start pulse per sub-block");
    check(t_gear[1] > t_state[int'(ST_PLL)] + 16, "first gear shift after the hold time");
    check(t_gear[2] - t_gear[1] == 41, $sformatf("gear 2 after gs_int1 (%0d)", t_gear[2] - t_gear[1]));
    check(t_gear[3] - t_gear[2] == 52, $sformatf("gear 3 after gs_int2 (%0d)", t_gear[3] - t_gear[2]));
    check(t_state[int'(ST_DCOCAL)] - t_gear[3] == 52, "DCO calibration after the last gear");
    // the first shift must not fire while the word sits on a rail
    rail = 1;
    run(t);
    check(!locked && state == ST_PLL && gear == 0, "no gear shift on a railed word");
    rail = 0;
    while (!locked && t < 4000) begin @(posedge clk); t++; end
    check(locked, "shift once the word leaves the rail");
    // short path
    cfg.last_gear = 2'd0; cfg.dcocal_en = 1'b0;
    run(t);
    check(locked && n_pulse[4] == 0 && t_gear[1] == 0, "no gears and no DCO calibration when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
