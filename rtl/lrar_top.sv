// lrar_top -- retention-aware auto-refresh unit of a DDR4 memory controller.
//
// One refresh interval timer paces all ranks; each rank has its own LRAR
// sequencer (lrar_rank_refresh) with a controller-visible row counter, a
// 2-bit refresh-window flag and a weak row table (WRT) plus comparator bank
// per bank. At every tREFI the sequencer of each rank walks its next
// ROWS_PER_REF rows and, outside the one-in-four full-refresh window,
// refreshes only rows that some bank's WRT names (weak rows in DM, 256-row
// clusters in AM) and skips the rest. The defaults are the evaluated DDR4
// organisation: 2 ranks of 16 banks (4 bank groups x 4 banks), 15-bit rows,
// 16 WRT entries per bank, tREFI of 12,480 cycles.
//
// Interface: en starts the refresh timer; hot halves tREFI (85 C and above);
// temp_scale_en allows a bank whose DM table overflows to fall back to AM.
// cfg_* writes one bank's WRT (rank cfg_rank, bank cfg_bank). Per rank the
// unit reports its refresh activity: busy (rank blocked by refresh), the row
// slot being decided and the banks refreshed at it, the window flag, the
// number of postponed refresh commands and the counts of refreshed and
// skipped slots. Issuing the resulting row refresh commands to the DRAM is
// left to the command scheduler that consumes slot_refresh and busy.
// Timing is that of lrar_rank_refresh, plus one cycle from the timer.
module lrar_top
  import lrar_pkg::*;
#(
  parameter int unsigned RANKS        = RANKS_DEF,
  parameter int unsigned NUM_BANKS    = BANKS_DEF,
  parameter int unsigned ROW_BITS     = ROW_BITS_DEF,
  parameter int unsigned ENTRIES      = WRT_ENTRIES_DEF,
  parameter int unsigned CLUSTER_BITS = CLUSTER_BITS_DEF,
  parameter int unsigned TREFI        = TREFI_DEF,
  parameter int unsigned ROWS_PER_REF = ROWS_PER_REF_DEF,
  parameter int unsigned TROW         = TROW_DEF,
  parameter int unsigned PEND_MAX     = PEND_MAX_DEF,
  localparam int unsigned KW          = (RANKS > 1) ? $clog2(RANKS) : 1,
  localparam int unsigned BW          = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int unsigned PW          = $clog2(PEND_MAX + 1)
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  en,
  input  logic                                  hot,
  input  logic                                  temp_scale_en,
  input  logic [KW-1:0]                         cfg_rank,
  input  logic [BW-1:0]                         cfg_bank,
  input  logic                                  cfg_wr_en,
  input  logic [ROW_BITS-1:0]                   cfg_row,
  input  logic                                  cfg_set_mode,
  input  lrar_mode_e                            cfg_mode,
  input  logic                                  cfg_clear,
  output logic                                  ref_tick,
  output logic [RANKS-1:0]                      busy,
  output logic [RANKS-1:0]                      slot_valid,
  output logic [RANKS-1:0][ROW_BITS-1:0]        slot_row,
  output logic [RANKS-1:0][NUM_BANKS-1:0]       slot_refresh,
  output logic [RANKS-1:0][1:0]                 window_flag,
  output logic [RANKS-1:0][PW-1:0]              pending,
  output logic [RANKS-1:0]                      ref_overflow,
  output lrar_mode_e [RANKS-1:0][NUM_BANKS-1:0] bank_mode,
  output logic [RANKS-1:0][NUM_BANKS-1:0]       bank_to_am,
  output logic [RANKS-1:0][NUM_BANKS-1:0]       bank_dropped,
  output logic [RANKS-1:0][31:0]                slots_refreshed,
  output logic [RANKS-1:0][31:0]                slots_skipped
);
  lrar_refi_timer #(.TREFI(TREFI)) u_timer (
    .clk(clk), .rst_n(rst_n), .en(en), .hot(hot), .ref_tick(ref_tick)
  );

  for (genvar k = 0; k < RANKS; k++) begin : g_rank
    lrar_rank_refresh #(
      .NUM_BANKS(NUM_BANKS), .ROW_BITS(ROW_BITS), .ENTRIES(ENTRIES),
      .CLUSTER_BITS(CLUSTER_BITS), .ROWS_PER_REF(ROWS_PER_REF), .TROW(TROW),
      .PEND_MAX(PEND_MAX)
    ) u_rank (
      .clk(clk), .rst_n(rst_n), .ref_tick(ref_tick), .temp_scale_en(temp_scale_en),
      .cfg_bank(cfg_bank), .cfg_wr_en(cfg_wr_en && cfg_rank == KW'(k)), .cfg_row(cfg_row),
      .cfg_set_mode(cfg_set_mode && cfg_rank == KW'(k)), .cfg_mode(cfg_mode),
      .cfg_clear(cfg_clear && cfg_rank == KW'(k)),
      .busy(busy[k]), .slot_valid(slot_valid[k]), .slot_row(slot_row[k]),
      .slot_refresh(slot_refresh[k]), .window_flag(window_flag[k]),
      .pending(pending[k]), .ref_overflow(ref_overflow[k]),
      .bank_mode(bank_mode[k]), .bank_to_am(bank_to_am[k]), .bank_dropped(bank_dropped[k]),
      .slots_refreshed(slots_refreshed[k]), .slots_skipped(slots_skipped[k])
    );
  end
endmodule
