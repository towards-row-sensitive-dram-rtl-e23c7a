// tb_lrar_refi_timer -- self-checking test of the refresh interval timer.
// Measures the gap between ticks with a small TREFI, at normal temperature
// (TREFI cycles) and hot (TREFI/2 cycles, from the reload after hot rises),
// and checks that en=0 stops the ticks.
module tb_lrar_refi_timer;
  localparam int unsigned TREFI = 24;
  logic clk = 0, rst_n = 0, en = 0, hot = 0, ref_tick;
  logic hot_q = 0;
  int checks = 0, failures = 0;
  int last = 0, cyc = 0, nticks = 0, nhot = 0, t0, n0;

  lrar_refi_timer #(.TREFI(TREFI)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // The interval after a tick follows `hot` at that tick's reload. Gaps
  // are checked only when hot has not changed since two cycles before the
  // previous tick, so the expected interval is unambiguous.
  int hot_change = 0;
  always @(posedge clk) begin
    hot_q <= hot;
    if (hot_q != hot) hot_change = cyc;
    if (rst_n && ref_tick) begin
      if (nticks > 0 && hot_change < last - 2)
        check(cyc - last == (hot ? TREFI / 2 : TREFI),
              $sformatf("gap %0d hot %0b", cyc - last, hot));
      if (hot) nhot = nhot + 1;
      last   = cyc;
      nticks = nticks + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3 * TREFI) @(posedge clk);
    check(nticks == 0, "tick while disabled");
    @(negedge clk) en = 1;
    t0 = cyc;
    @(posedge clk iff ref_tick);
    check(cyc - t0 == TREFI, $sformatf("first tick after %0d", cyc - t0));
    repeat (5 * TREFI + 3) @(posedge clk);
    @(negedge clk) hot = 1;
    repeat (6 * TREFI + 5) @(posedge clk);
    @(negedge clk) hot = 0;
    repeat (4 * TREFI + 7) @(posedge clk);
    check(nticks >= 20, $sformatf("ticks %0d", nticks));
    check(nhot >= 8, $sformatf("hot ticks %0d", nhot));
    @(negedge clk) en = 0;
    n0 = nticks;
    repeat (3 * TREFI) @(posedge clk);
    check(nticks == n0, "tick while paused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
