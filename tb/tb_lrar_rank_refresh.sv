// tb_lrar_rank_refresh -- self-checking test of the per-rank LRAR sequencer.
// Four banks with full-size 15-bit rows and 16-entry tables:
//   bank 0 deterministic mode (DM) with weak rows, incl. the first and last row;
//   bank 1 approximate mode (AM) with cluster tags;
//   bank 2 DM overfilled under temperature scaling, so it falls back to AM;
//   bank 3 empty.
// REF ticks arrive every GAP cycles for five refresh windows, plus one burst
// that overfills the postponed-REF queue. A model of the row counter, the
// window flag and each bank's row/cluster set predicts every lookup: the row,
// the banks refreshed (all in window 00, table hits otherwise), the lookup
// spacing (1 cycle when skipped, 1+TROW when refreshed) and the final counts.
module tb_lrar_rank_refresh;
  import lrar_pkg::*;
  localparam int unsigned NB = 4, RB = 15, N = 16, CB = 7, RPR = 4, TROW = 5, PEND = 8;
  localparam int unsigned GAP = 30;
  localparam int unsigned ROWS = 1 << RB;
  localparam int unsigned PW = $clog2(PEND + 1);

  logic clk = 0, rst_n = 0, ref_tick = 0, temp_scale_en = 0;
  logic [1:0] cfg_bank = '0;
  logic cfg_wr_en = 0, cfg_set_mode = 0, cfg_clear = 0;
  logic [RB-1:0] cfg_row = '0;
  lrar_mode_e cfg_mode = MODE_DM;
  logic busy, slot_valid, ref_overflow;
  logic [RB-1:0] slot_row;
  logic [NB-1:0] slot_refresh, bank_to_am, bank_dropped;
  logic [1:0] window_flag;
  logic [PW-1:0] pending;
  lrar_mode_e [NB-1:0] bank_mode;
  logic [31:0] slots_refreshed, slots_skipped;

  lrar_rank_refresh #(.NUM_BANKS(NB), .ROW_BITS(RB), .ENTRIES(N), .CLUSTER_BITS(CB),
                      .ROWS_PER_REF(RPR), .TROW(TROW), .PEND_MAX(PEND)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---- model of the bank tables ----
  bit          am   [NB];
  bit          rows [NB][int];
  bit          tags [NB][int];
  function automatic bit covers(int b, int unsigned r);
    return am[b] ? tags[b].exists(int'(r >> (RB - CB))) : rows[b].exists(int'(r));
  endfunction

  task automatic wr(int b, int unsigned r);
    @(negedge clk); cfg_bank = 2'(b); cfg_row = RB'(r); cfg_wr_en = 1;
    @(negedge clk); cfg_wr_en = 0;
  endtask
  task automatic setm(int b, lrar_mode_e m);
    @(negedge clk); cfg_bank = 2'(b); cfg_mode = m; cfg_set_mode = 1;
    @(negedge clk); cfg_set_mode = 0;
  endtask

  // ---- lookup monitor ----
  int unsigned r_exp = 0, windows = 0, n_ref = 0, n_skip = 0, lookups = 0;
  int unsigned n_weak_only = 0, n_full = 0, n_am_hit = 0;
  int cyc = 0, last_lookup = -1, expect_gap = 0, slot_in_ref = 0;
  int max_pending = 0, n_overflow = 0, n_postponed = 0;
  bit running = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    if (int'(pending) > max_pending) max_pending = pending;
    if (ref_overflow) n_overflow++;
    if (ref_tick && busy) n_postponed++;
    if (slot_valid) begin
      logic [NB-1:0] m;
      for (int b = 0; b < NB; b++) m[b] = (windows % 4 == 0) || covers(b, r_exp);
      check(slot_row == RB'(r_exp), $sformatf("row %0d expected %0d", slot_row, r_exp));
      check(slot_refresh == m, $sformatf("row %0d window %0d mask %b expected %b",
                                         r_exp, windows, slot_refresh, m));
      check(window_flag == 2'(windows % 4), "window flag");
      if (slot_in_ref != 0)
        check(cyc - last_lookup == expect_gap,
              $sformatf("lookup spacing %0d expected %0d", cyc - last_lookup, expect_gap));
      expect_gap  = (m != 0) ? TROW + 1 : 1;
      slot_in_ref = (slot_in_ref + 1) % RPR;
      last_lookup = cyc;
      lookups++;
      if (m != 0) n_ref++; else n_skip++;
      if (windows % 4 == 0) n_full++;
      else if (m != 0) n_weak_only++;
      if (windows % 4 != 0 && (m[1] || m[2])) n_am_hit++;
      r_exp = (r_exp + 1) % ROWS;
      if (r_exp == 0) windows++;
    end
  end

  int ticks = 0;
  int weak_rows0 [7] = '{0, 1, 100, 255, 4096, 20000, 32767};
  int clusters1 [3] = '{3, 40, 127};
  initial begin
    am[0] = 0; am[1] = 1; am[2] = 0; am[3] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // bank 0: DM weak rows
    foreach (weak_rows0[i]) begin
      wr(0, weak_rows0[i]); rows[0][weak_rows0[i]] = 1;
    end
    // bank 1: AM clusters
    setm(1, MODE_AM);
    foreach (clusters1[i]) begin
      wr(1, (clusters1[i] << 8) + 17); tags[1][clusters1[i]] = 1;
    end
    // bank 2: 17 rows under temperature scaling -> AM
    temp_scale_en = 1;
    for (int i = 0; i < 17; i++) begin
      wr(2, (i * 1931 + 300) % ROWS); tags[2][((i * 1931 + 300) % ROWS) >> 8] = 1;
    end
    am[2] = 1;
    check(bank_mode[2] == MODE_AM && bank_mode[0] == MODE_DM && bank_mode[1] == MODE_AM, "bank modes");
    // REF ticks for five windows; one burst in window 0
    running = 1;
    while (windows < 5) begin
      @(negedge clk); ref_tick = 1; ticks++;
      @(negedge clk); ref_tick = 0;
      if (ticks == 100) begin
        // burst in a full-refresh window: PEND+4 back-to-back ticks overfill the queue
        for (int k = 0; k < PEND + 4; k++) begin
          @(negedge clk); ref_tick = 1; ticks++;
        end
        @(negedge clk); ref_tick = 0;
      end
      repeat (GAP - 2) @(negedge clk);
    end
    wait (!busy && pending == 0);
    repeat (5) @(negedge clk);
    check(n_overflow >= 2 && n_overflow <= 4, $sformatf("overflows %0d", n_overflow));
    check(max_pending == PEND, $sformatf("max pending %0d", max_pending));
    check(lookups == RPR * (ticks - n_overflow), $sformatf("lookups %0d ticks %0d", lookups, ticks));
    check(slots_refreshed == n_ref && slots_skipped == n_skip,
          $sformatf("counters %0d/%0d model %0d/%0d", slots_refreshed, slots_skipped, n_ref, n_skip));
    check(n_full > 0 && n_weak_only > 0 && n_am_hit > 0 && n_skip > 0,
          $sformatf("events full %0d weak %0d am %0d skip %0d", n_full, n_weak_only, n_am_hit, n_skip));
    $display("lookups %0d refreshed %0d skipped %0d postponed %0d", lookups, n_ref, n_skip, n_postponed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
