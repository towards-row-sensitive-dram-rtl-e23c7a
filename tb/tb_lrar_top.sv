// tb_lrar_top -- end-to-end test of the retention-aware refresh unit.
// Two ranks of 16 banks with 16-entry tables; to keep the run short the rows
// per bank are reduced to 8,192 (13-bit rows, 5-bit cluster tags, so a
// cluster is still 256 rows) and tREFI to 160 cycles. Per-row refresh cost is
// the default 35 cycles.
// The tables are loaded through the configuration port: deterministic-mode
// (DM) weak rows, approximate-mode (AM) clusters, a DM table overfilled under
// temperature scaling (falls back to AM) and one overfilled without it
// (writes dropped). The unit then runs for six refresh windows, part of the
// time hot (halved tREFI), which makes full-refresh windows postpone and,
// at the queue limit, lose REF commands.
// A model of each rank's row counter, window flag and bank tables predicts
// every row slot; the test also checks the tREFI spacing, and the final
// counters, and counts each mechanism: full refresh, weak-row refresh, AM
// cluster refresh, skip, DM-to-AM fallback, dropped write, hot interval,
// postponed REF, lost REF and the flag returning to 00.
module tb_lrar_top;
  import lrar_pkg::*;
  localparam int unsigned RK = 2, NB = 16, RB = 13, N = 16, CB = 5;
  localparam int unsigned TREFI = 160, RPR = 4, TROW = 35, PEND = 8;
  localparam int unsigned ROWS = 1 << RB, SH = RB - CB;
  localparam int unsigned PW = $clog2(PEND + 1);

  logic clk = 0, rst_n = 0, en = 0, hot = 0, temp_scale_en = 0;
  logic [0:0] cfg_rank = '0;
  logic [3:0] cfg_bank = '0;
  logic cfg_wr_en = 0, cfg_set_mode = 0, cfg_clear = 0;
  logic [RB-1:0] cfg_row = '0;
  lrar_mode_e cfg_mode = MODE_DM;
  logic ref_tick;
  logic [RK-1:0] busy, slot_valid, ref_overflow;
  logic [RK-1:0][RB-1:0] slot_row;
  logic [RK-1:0][NB-1:0] slot_refresh, bank_to_am, bank_dropped;
  logic [RK-1:0][1:0] window_flag;
  logic [RK-1:0][PW-1:0] pending;
  lrar_mode_e [RK-1:0][NB-1:0] bank_mode;
  logic [RK-1:0][31:0] slots_refreshed, slots_skipped;

  lrar_top #(.RANKS(RK), .NUM_BANKS(NB), .ROW_BITS(RB), .ENTRIES(N), .CLUSTER_BITS(CB),
             .TREFI(TREFI), .ROWS_PER_REF(RPR), .TROW(TROW), .PEND_MAX(PEND)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---- model of the tables: DM rows or AM clusters, per rank and bank ----
  bit am   [RK][NB];
  bit rows [RK][NB][int];
  bit tags [RK][NB][int];
  int used [RK][NB];
  function automatic bit covers(int k, int b, int unsigned r);
    return am[k][b] ? tags[k][b].exists(int'(r >> SH)) : rows[k][b].exists(int'(r));
  endfunction

  int n_to_am = 0, n_dropped = 0;
  // Model of one table write (append, fallback, drop).
  task automatic wr(int k, int b, int unsigned r);
    @(negedge clk); cfg_rank = 1'(k); cfg_bank = 4'(b); cfg_row = RB'(r); cfg_wr_en = 1;
    @(negedge clk); cfg_wr_en = 0;
    if (!am[k][b]) begin
      if (used[k][b] < N) begin rows[k][b][r] = 1; used[k][b]++; end
      else if (temp_scale_en) begin
        am[k][b] = 1;
        foreach (rows[k][b][x]) tags[k][b][x >> SH] = 1;
        tags[k][b][r >> SH] = 1; used[k][b]++;
      end
    end else if (used[k][b] < 2 * N) begin
      tags[k][b][r >> SH] = 1; used[k][b]++;
    end
    // the status pulses are registered: visible now
    if (bank_to_am[k][b]) n_to_am++;
    if (bank_dropped[k][b]) n_dropped++;
  endtask
  task automatic setm(int k, int b, lrar_mode_e m);
    @(negedge clk); cfg_rank = 1'(k); cfg_bank = 4'(b); cfg_mode = m; cfg_set_mode = 1;
    @(negedge clk); cfg_set_mode = 0;
    am[k][b] = (m == MODE_AM); rows[k][b].delete(); tags[k][b].delete(); used[k][b] = 0;
  endtask

  // ---- per-rank slot monitor ----
  int unsigned r_exp [RK], windows [RK], lookups [RK], n_ref [RK], n_skip [RK];
  int n_full = 0, n_weak = 0, n_dm_hit = 0, n_am_hit = 0, n_skipped = 0, n_postponed = 0, n_lost [RK];
  int n_flag_wrap = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < RK; k++) begin
      if (ref_overflow[k]) n_lost[k]++;
      if (pending[k] > 1) n_postponed++;
      if (slot_valid[k]) begin
        logic [NB-1:0] m;
        bit am_hit, dm_hit;
        am_hit = 0; dm_hit = 0;
        for (int b = 0; b < NB; b++) begin
          m[b] = (windows[k] % 4 == 0) || covers(k, b, r_exp[k]);
          if (am[k][b] && covers(k, b, r_exp[k])) am_hit = 1;
          if (!am[k][b] && covers(k, b, r_exp[k])) dm_hit = 1;
        end
        check(slot_row[k] == RB'(r_exp[k]), $sformatf("rank %0d row %0d expected %0d", k, slot_row[k], r_exp[k]));
        check(slot_refresh[k] == m, $sformatf("rank %0d row %0d window %0d mask %h expected %h",
                                              k, r_exp[k], windows[k], slot_refresh[k], m));
        check(window_flag[k] == 2'(windows[k] % 4), "window flag");
        lookups[k]++;
        if (m != 0) n_ref[k]++; else n_skip[k]++;
        if (windows[k] % 4 == 0) n_full++;
        else if (m != 0) begin n_weak++; if (am_hit) n_am_hit++; if (dm_hit) n_dm_hit++; end
        else n_skipped++;
        r_exp[k] = (r_exp[k] + 1) % ROWS;
        if (r_exp[k] == 0) begin
          windows[k]++;
          if (windows[k] % 4 == 0) n_flag_wrap++;
        end
      end
    end
  end

  // ---- tREFI spacing ----
  int last_tick = -1, ticks = 0, n_hot_gap = 0, hot_change = 0;
  logic hot_q = 0;
  always @(posedge clk) begin
    hot_q <= hot;
    if (hot_q != hot) hot_change = cyc;
    if (rst_n && ref_tick) begin
      if (last_tick >= 0 && hot_change < last_tick - 2) begin
        check(cyc - last_tick == (hot ? TREFI / 2 : TREFI),
              $sformatf("tick gap %0d hot %0b", cyc - last_tick, hot));
        if (hot) n_hot_gap++;
      end
      last_tick = cyc;
      ticks++;
    end
  end

  initial begin
    for (int k = 0; k < RK; k++) begin
      r_exp[k] = 0; windows[k] = 0; lookups[k] = 0; n_ref[k] = 0; n_skip[k] = 0; n_lost[k] = 0;
      for (int b = 0; b < NB; b++) begin am[k][b] = 0; used[k][b] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // rank 0: DM weak rows in most banks (with a repeat), AM in bank 5,
    // overflow with temperature scaling in bank 7, without in bank 9
    for (int b = 0; b < NB; b++)
      if (b != 5 && b != 7 && b != 9)
        for (int i = 0; i < 3; i++) wr(0, b, (b * 97 + i * 1000) % ROWS);
    wr(0, 3, (3 * 97) % ROWS);
    setm(0, 5, MODE_AM);
    wr(0, 5, 10 << SH); wr(0, 5, (20 << SH) + 200); wr(0, 5, (20 << SH) + 3);
    for (int i = 0; i < N + 3; i++) wr(0, 9, (i * 389 + 11) % ROWS);
    temp_scale_en = 1;
    for (int i = 0; i < N + 3; i++) wr(0, 7, (i * 433 + 50) % ROWS);
    // rank 1: AM in bank 0, DM in bank 15, the rest empty
    setm(1, 0, MODE_AM);
    for (int i = 0; i < 4; i++) wr(1, 0, (i * 7 + 1) << SH);
    for (int i = 0; i < 5; i++) wr(1, 15, i * 1500 + 9);
    repeat (2) @(negedge clk);
    check(bank_mode[0][7] == MODE_AM && bank_mode[0][9] == MODE_DM && bank_mode[0][5] == MODE_AM
          && bank_mode[1][0] == MODE_AM && bank_mode[0][0] == MODE_DM, "bank modes after loading");
    // run: hot during part of window 1 (skipping) and window 4 (full refresh)
    @(negedge clk) en = 1;
    while (windows[0] < 6) begin
      @(negedge clk);
      if (windows[0] == 1 && r_exp[0] == 1000) hot = 1;
      if (windows[0] == 1 && r_exp[0] == 3000) hot = 0;
      if (windows[0] == 4 && r_exp[0] == 1000) hot = 1;
      if (windows[0] == 4 && r_exp[0] == 2000) hot = 0;
    end
    en = 0;
    wait (busy == '0 && pending == '0);
    repeat (5) @(negedge clk);
    for (int k = 0; k < RK; k++) begin
      check(lookups[k] == RPR * (ticks - n_lost[k]),
            $sformatf("rank %0d lookups %0d ticks %0d lost %0d", k, lookups[k], ticks, n_lost[k]));
      check(slots_refreshed[k] == n_ref[k] && slots_skipped[k] == n_skip[k],
            $sformatf("rank %0d counters %0d/%0d model %0d/%0d", k, slots_refreshed[k],
                      slots_skipped[k], n_ref[k], n_skip[k]));
    end
    $display("mechanisms: full %0d weak %0d dm_hit %0d am_hit %0d skip %0d to_am %0d dropped %0d hot_gaps %0d postponed %0d lost %0d flag_wraps %0d",
             n_full, n_weak, n_dm_hit, n_am_hit, n_skipped, n_to_am, n_dropped, n_hot_gap, n_postponed,
             n_lost[0] + n_lost[1], n_flag_wrap);
    check(n_full > 0, "full refresh never happened");
    check(n_dm_hit > 0, "DM weak-row refresh never happened");
    check(n_am_hit > 0, "AM cluster refresh never happened");
    check(n_skipped > 0, "skip never happened");
    check(n_to_am > 0, "DM-to-AM fallback never happened");
    check(n_dropped > 0, "dropped write never happened");
    check(n_hot_gap > 0, "hot interval never happened");
    check(n_postponed > 0, "postponed REF never happened");
    check(n_lost[0] + n_lost[1] > 0, "lost REF never happened");
    check(n_flag_wrap > 0, "window flag never returned to 00");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
