// tb_lrar_workloads -- the two table workloads the design is sized for, run
// through the refresh unit for one full 4-window flag cycle (256 ms of
// refresh activity at normal temperature).
//   Rank 0, deterministic mode: every row of every bank is weak with
//   probability 2.3e-4 (about 7.5 rows per 32,768-row bank, against 16
//   table entries); the weak rows are loaded, with temperature scaling on.
//   Rank 1, approximate mode: 25% of the rows of every bank are given
//   variable retention time (VRT), placed at random; the 32 clusters of 256
//   rows holding the most VRT rows are loaded (a simple density ranking).
// Rows are full size (15 bits, 7-bit tags); tREFI is shortened to 160
// cycles so the 32,768 REF commands run quickly. A model predicts every row
// slot. At the end the test reports, per rank, the bank-row refreshes issued
// against the 4 x 32,768 x 16 of plain auto-refresh, and for rank 1 the
// fraction of VRT rows that the clusters refresh every window, and checks
// them against the model's own count.
module tb_lrar_workloads;
  import lrar_pkg::*;
  localparam int unsigned RK = 2, NB = 16, RB = 15, N = 16, CB = 7;
  localparam int unsigned TREFI = 160;
  localparam int unsigned ROWS = 1 << RB, SH = RB - CB, NCL = 1 << CB;

  logic clk = 0, rst_n = 0, en = 0, hot = 0, temp_scale_en = 1;
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

  lrar_top #(.TREFI(TREFI)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // expected refresh mask outside window 00, and VRT marks
  logic [NB-1:0] mask [RK][ROWS];
  logic [NB-1:0] vrt  [ROWS];
  int vrt_in_cluster [NCL];
  int n_weak_rows = 0, n_vrt_rows = 0, n_vrt_covered = 0;

  task automatic wr(int k, int b, int unsigned r);
    @(negedge clk); cfg_rank = 1'(k); cfg_bank = 4'(b); cfg_row = RB'(r); cfg_wr_en = 1;
    @(negedge clk); cfg_wr_en = 0;
  endtask

  // slot monitor: bank-row refreshes per rank and VRT rows refreshed in
  // windows other than 00
  int unsigned r_exp [RK], windows [RK];
  longint bank_rows [RK];
  longint vrt_hits = 0;
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < RK; k++) if (slot_valid[k]) begin
      logic [NB-1:0] m;
      m = (windows[k] % 4 == 0) ? '1 : mask[k][r_exp[k]];
      check(slot_row[k] == RB'(r_exp[k]) && slot_refresh[k] == m,
            $sformatf("rank %0d row %0d mask %h expected %h", k, r_exp[k], slot_refresh[k], m));
      bank_rows[k] += $countones(slot_refresh[k]);
      if (k == 1 && windows[k] % 4 != 0) vrt_hits += $countones(slot_refresh[k] & vrt[r_exp[k]]);
      r_exp[k] = (r_exp[k] + 1) % ROWS;
      if (r_exp[k] == 0) windows[k]++;
    end
  end

  initial begin
    for (int k = 0; k < RK; k++) begin
      r_exp[k] = 0; windows[k] = 0; bank_rows[k] = 0;
      for (int r = 0; r < ROWS; r++) mask[k][r] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // rank 0: random weak rows, probability 2.3e-4 (23 in 100,000). A bank
    // with more than 16 (about 0.3% of banks) would fall back to clusters,
    // which tb_lrar_top covers; here such extra rows are not loaded.
    for (int b = 0; b < NB; b++) begin
      int nb;
      nb = 0;
      for (int r = 0; r < ROWS; r++)
        if ($urandom % 100000 < 23 && nb < N) begin
          wr(0, b, r); nb++; n_weak_rows++;
          mask[0][r][b] = 1'b1;
        end
    end
    // rank 1: 25% VRT rows, 32 densest clusters per bank
    for (int b = 0; b < NB; b++) begin
      @(negedge clk); cfg_rank = 1; cfg_bank = 4'(b); cfg_mode = MODE_AM; cfg_set_mode = 1;
      @(negedge clk); cfg_set_mode = 0;
      for (int c = 0; c < NCL; c++) vrt_in_cluster[c] = 0;
      for (int r = 0; r < ROWS; r++) begin
        vrt[r][b] = ($urandom % 4) == 0;
        if (vrt[r][b]) begin vrt_in_cluster[r >> SH]++; n_vrt_rows++; end
      end
      for (int j = 0; j < 2 * N; j++) begin
        int best;
        best = 0;
        for (int c = 1; c < NCL; c++) if (vrt_in_cluster[c] > vrt_in_cluster[best]) best = c;
        wr(1, b, best << SH);
        n_vrt_covered += vrt_in_cluster[best];
        for (int r = 0; r < (1 << SH); r++) mask[1][(best << SH) + r][b] = 1'b1;
        vrt_in_cluster[best] = -1;
      end
    end
    @(negedge clk) en = 1;
    wait (windows[0] == 4 && windows[1] == 4);
    @(negedge clk) en = 0;
    wait (busy == '0);
    repeat (3) @(negedge clk);
    // expected counts
    begin
      longint full_rows, exp0, exp1;
      full_rows = longint'(ROWS) * NB;
      exp0 = full_rows + 3 * longint'(n_weak_rows);
      exp1 = full_rows + 3 * longint'(2 * N) * (1 << SH) * NB;
      check(bank_rows[0] == exp0, $sformatf("rank 0 bank-row refreshes %0d expected %0d", bank_rows[0], exp0));
      check(bank_rows[1] == exp1, $sformatf("rank 1 bank-row refreshes %0d expected %0d", bank_rows[1], exp1));
      check(vrt_hits == 3 * longint'(n_vrt_covered), $sformatf("VRT refreshes %0d expected %0d", vrt_hits, 3 * n_vrt_covered));
      $display("DM: %0d weak rows in %0d banks; bank-row refreshes %0d of %0d (%0.1f%% fewer)",
               n_weak_rows, NB, bank_rows[0], 4 * full_rows, 100.0 * (1.0 - real'(bank_rows[0]) / real'(4 * full_rows)));
      $display("AM: bank-row refreshes %0d of %0d (%0.1f%% fewer); VRT rows in clusters %0d of %0d (%0.1f%%)",
               bank_rows[1], 4 * full_rows, 100.0 * (1.0 - real'(bank_rows[1]) / real'(4 * full_rows)),
               n_vrt_covered, n_vrt_rows, 100.0 * real'(n_vrt_covered) / real'(n_vrt_rows));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (64'd160 * 32768 + 64'd2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
