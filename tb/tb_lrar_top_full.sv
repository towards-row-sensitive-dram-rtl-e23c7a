// tb_lrar_top_full -- the refresh unit at its default size: 2 ranks x 16
// banks, 32,768 rows per bank, 16-entry tables, tREFI = 12,480 cycles,
// 35-cycle row refresh. A few banks are loaded with weak rows (DM) and
// clusters (AM); the unit then runs through the full-refresh window at
// normal temperature (flag 00, every row of every bank refreshed, 64 ms:
// 8,192 REF intervals of 12,480 cycles, about 102 million cycles) and then,
// with the device hot (tREFI halved, 32 ms window), through the following
// window in which only table rows are refreshed. Every row slot is predicted
// by a model of the row counter and the tables; the slot counters, the REF
// spacing and the absence of lost REF commands are checked.
module tb_lrar_top_full;
  import lrar_pkg::*;
  localparam int unsigned RK = RANKS_DEF, NB = BANKS_DEF, RB = ROW_BITS_DEF, CB = CLUSTER_BITS_DEF;
  localparam int unsigned ROWS = 1 << RB, SH = RB - CB;
  localparam int unsigned RUN_WINDOWS = 2;

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
  logic [RK-1:0][3:0] pending;
  lrar_mode_e [RK-1:0][NB-1:0] bank_mode;
  logic [RK-1:0][31:0] slots_refreshed, slots_skipped;

  lrar_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // expected refresh mask of every row of a rank outside the full window
  logic [NB-1:0] weak_mask [RK][ROWS];

  task automatic wr(int k, int b, int unsigned r);
    @(negedge clk); cfg_rank = 1'(k); cfg_bank = 4'(b); cfg_row = RB'(r); cfg_wr_en = 1;
    @(negedge clk); cfg_wr_en = 0;
  endtask

  // REF spacing: 12,480 cycles, 6,240 once hot (hot is raised mid-interval,
  // so the interval in progress is not checked)
  int cyc = 0, last_tick = -1, hot_ticks = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && ref_tick) begin
      if (last_tick >= 0 && !(hot && hot_ticks == 0))
        check(cyc - last_tick == (hot ? TREFI_DEF / 2 : TREFI_DEF),
              $sformatf("tick gap %0d", cyc - last_tick));
      if (hot) hot_ticks++;
      last_tick = cyc;
    end
  end

  int unsigned r_exp [RK], windows [RK], n_ref [RK], n_skip [RK];
  int n_lost = 0;
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < RK; k++) begin
      if (ref_overflow[k]) n_lost++;
      if (slot_valid[k]) begin
        logic [NB-1:0] m;
        m = (windows[k] % 4 == 0) ? '1 : weak_mask[k][r_exp[k]];
        check(slot_row[k] == RB'(r_exp[k]) && slot_refresh[k] == m,
              $sformatf("rank %0d row %0d/%0d mask %h expected %h", k, slot_row[k], r_exp[k],
                        slot_refresh[k], m));
        if (m != 0) n_ref[k]++; else n_skip[k]++;
        r_exp[k] = (r_exp[k] + 1) % ROWS;
        if (r_exp[k] == 0) windows[k]++;
      end
    end
  end

  initial begin
    for (int k = 0; k < RK; k++) begin
      r_exp[k] = 0; windows[k] = 0; n_ref[k] = 0; n_skip[k] = 0;
      for (int r = 0; r < ROWS; r++) weak_mask[k][r] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // rank 0, banks 0..15: 16 weak rows each (a full DM table)
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 16; i++) begin
        int unsigned r;
        r = (b * 211 + i * 2039) % ROWS;
        wr(0, b, r);
        weak_mask[0][r][b] = 1'b1;
      end
    // rank 1, bank 3: approximate mode with 32 clusters (every fourth one)
    @(negedge clk); cfg_rank = 1; cfg_bank = 3; cfg_mode = MODE_AM; cfg_set_mode = 1;
    @(negedge clk); cfg_set_mode = 0;
    for (int c = 0; c < 32; c++) begin
      wr(1, 3, (c * 4) << SH);
      for (int r = 0; r < (1 << SH); r++) weak_mask[1][((c * 4) << SH) + r][3] = 1'b1;
    end
    @(negedge clk) en = 1;
    wait (windows[0] == 1 && windows[1] == 1);
    @(negedge clk) hot = 1;
    wait (windows[0] == RUN_WINDOWS && windows[1] == RUN_WINDOWS);
    @(negedge clk) en = 0;
    wait (busy == '0);
    repeat (3) @(negedge clk);
    for (int k = 0; k < RK; k++)
      check(slots_refreshed[k] == n_ref[k] && slots_skipped[k] == n_skip[k],
            $sformatf("rank %0d counters %0d/%0d model %0d/%0d", k, slots_refreshed[k],
                      slots_skipped[k], n_ref[k], n_skip[k]));
    check(n_lost == 0, "REF lost at default timing");
    check(hot_ticks > 8000, $sformatf("hot REF intervals %0d", hot_ticks));
    // window 1 of rank 0 refreshes only the 256 weak row slots (some may share a row)
    check(n_skip[0] > 0 && n_ref[0] >= ROWS && n_ref[0] <= ROWS + 256, $sformatf("rank 0 refreshed %0d", n_ref[0]));
    check(n_ref[1] == ROWS + ROWS / 4, $sformatf("rank 1 refreshed %0d", n_ref[1]));
    $display("rank0 refreshed %0d skipped %0d, rank1 refreshed %0d skipped %0d",
             n_ref[0], n_skip[0], n_ref[1], n_skip[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // one window of 12,480-cycle and one of 6,240-cycle REF intervals
    repeat (64'd12480 * 8192 + 64'd6240 * 8192 + 64'd200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
