// lrar_rank_refresh -- LRAR refresh sequencer of one rank.
//
// Each auto-refresh (AR) command the controller owes the rank covers
// ROWS_PER_REF row slots (4 at the defaults: 32,768 rows over 8,192 commands
// per window). For every slot the sequencer looks the due row up in the weak
// row table (WRT) of every bank of the rank, all banks in parallel, and then:
//   * while the 2-bit window flag is 00 (one window in four), refreshes the
//     row in all banks -- the full refresh that keeps strong rows alive;
//   * otherwise refreshes it only in the banks whose WRT holds the row (DM) or
//     its cluster (AM), and skips it when no bank needs it.
// A skipped slot costs only the lookup cycle; a refreshed slot costs the
// lookup cycle plus TROW cycles during which the rank is blocked. The saving
// per skipped row is what shortens the time the rank is unavailable.
//
// Contents: the controller-side row counter and the window flag of the rank,
// and one WRT with its comparator bank per bank. The flag advances each time
// the row counter wraps, i.e. once per refresh window.
//
// AR commands that arrive while the rank is still busy are queued in a
// counter of postponed commands (up to PEND_MAX, the DDR4 limit of 8);
// a tick beyond that is lost and reported on ref_overflow. The queue, the
// per-bank refresh mask on slot_refresh and the cycle costs are this
// design's choices.
//
// Configuration port: cfg_* go to the WRT of bank cfg_bank (see lrar_wrt).
//
// Timing: ref_tick is counted at the clock edge; the first lookup follows
// one cycle later. slot_valid, slot_row and slot_refresh are combinational
// and valid in the lookup cycle; the refresh (if any) occupies the next
// TROW cycles. busy is high from the first lookup to the end of the command.
module lrar_rank_refresh
  import lrar_pkg::*;
#(
  parameter int unsigned NUM_BANKS    = BANKS_DEF,
  parameter int unsigned ROW_BITS     = ROW_BITS_DEF,
  parameter int unsigned ENTRIES      = WRT_ENTRIES_DEF,
  parameter int unsigned CLUSTER_BITS = CLUSTER_BITS_DEF,
  parameter int unsigned ROWS_PER_REF = ROWS_PER_REF_DEF,
  parameter int unsigned TROW         = TROW_DEF,
  parameter int unsigned PEND_MAX     = PEND_MAX_DEF,
  localparam int unsigned BW          = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ref_tick,
  input  logic                    temp_scale_en,
  // WRT configuration
  input  logic [BW-1:0]           cfg_bank,
  input  logic                    cfg_wr_en,
  input  logic [ROW_BITS-1:0]     cfg_row,
  input  logic                    cfg_set_mode,
  input  lrar_mode_e              cfg_mode,
  input  logic                    cfg_clear,
  // refresh activity
  output logic                    busy,
  output logic                    slot_valid,
  output logic [ROW_BITS-1:0]     slot_row,
  output logic [NUM_BANKS-1:0]    slot_refresh,
  output logic [1:0]              window_flag,
  output logic [$clog2(PEND_MAX+1)-1:0] pending,
  output logic                    ref_overflow,
  // status
  output lrar_mode_e [NUM_BANKS-1:0] bank_mode,
  output logic [NUM_BANKS-1:0]    bank_to_am,
  output logic [NUM_BANKS-1:0]    bank_dropped,
  output logic [31:0]             slots_refreshed,
  output logic [31:0]             slots_skipped
);
  localparam int unsigned PW = $clog2(PEND_MAX + 1);
  localparam int unsigned RW = (ROWS_PER_REF > 1) ? $clog2(ROWS_PER_REF) : 1;
  localparam int unsigned TW = $clog2(TROW + 1);
  localparam int unsigned SW = $clog2(2 * ENTRIES + 1);

  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_REFRESH} state_e;

  state_e         state;
  logic [RW-1:0]  rows_left;
  logic [TW-1:0]  trow_cnt;
  logic           adv, wrap, full_window, start;
  logic [ROW_BITS-1:0]  row;
  logic [NUM_BANKS-1:0] hit;

  lrar_row_counter #(.ROW_BITS(ROW_BITS)) u_row (
    .clk(clk), .rst_n(rst_n), .inc(adv), .row(row), .wrap(wrap)
  );

  lrar_window_flag u_flag (
    .clk(clk), .rst_n(rst_n), .window_done(wrap), .flag(window_flag),
    .full_window(full_window)
  );

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    logic [ENTRIES-1:0][ROW_BITS-1:0] entry;
    logic [ENTRIES-1:0] valid_hi, valid_lo, hit_vec;
    logic [SW-1:0]      used;
    logic               sel;

    assign sel = (cfg_bank == BW'(b));

    lrar_wrt #(.ROW_BITS(ROW_BITS), .ENTRIES(ENTRIES), .CLUSTER_BITS(CLUSTER_BITS)) u_wrt (
      .clk(clk), .rst_n(rst_n),
      .clear(cfg_clear && sel), .set_mode(cfg_set_mode && sel), .new_mode(cfg_mode),
      .temp_scale_en(temp_scale_en), .wr_en(cfg_wr_en && sel), .wr_row(cfg_row),
      .mode(bank_mode[b]), .entry(entry), .valid_hi(valid_hi), .valid_lo(valid_lo),
      .used(used), .to_am(bank_to_am[b]), .dropped(bank_dropped[b])
    );

    lrar_wrt_match #(.ROW_BITS(ROW_BITS), .ENTRIES(ENTRIES), .CLUSTER_BITS(CLUSTER_BITS)) u_match (
      .mode(bank_mode[b]), .entry(entry), .valid_hi(valid_hi), .valid_lo(valid_lo),
      .row(row), .hit_vec(hit_vec), .hit(hit[b])
    );
  end

  // Refresh decision: the multiplexer between the full refresh (flag 00)
  // and the weak-row refresh (table hit).
  always_comb begin
    slot_valid   = (state == S_LOOKUP);
    slot_row     = row;
    slot_refresh = slot_valid ? (full_window ? '1 : hit) : '0;
    busy         = (state != S_IDLE);
    start        = (state == S_IDLE) && (pending != '0);
    adv          = ((state == S_LOOKUP) && (slot_refresh == '0))
                || ((state == S_REFRESH) && (trow_cnt == '0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending      <= '0;
      ref_overflow <= 1'b0;
    end else begin
      ref_overflow <= 1'b0;
      if (ref_tick && !start) begin
        if (pending == PW'(PEND_MAX)) ref_overflow <= 1'b1;
        else                          pending <= pending + 1'b1;
      end else if (!ref_tick && start) begin
        pending <= pending - 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      rows_left       <= '0;
      trow_cnt        <= '0;
      slots_refreshed <= '0;
      slots_skipped   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state     <= S_LOOKUP;
          rows_left <= RW'(ROWS_PER_REF - 1);
        end
        S_LOOKUP: begin
          if (slot_refresh != '0) begin
            slots_refreshed <= slots_refreshed + 1'b1;
            state           <= S_REFRESH;
            trow_cnt        <= TW'(TROW - 1);
          end else begin
            slots_skipped <= slots_skipped + 1'b1;
            if (rows_left == '0) state <= S_IDLE;
            else                 rows_left <= rows_left - 1'b1;
          end
        end
        S_REFRESH: begin
          if (trow_cnt != '0) begin
            trow_cnt <= trow_cnt - 1'b1;
          end else if (rows_left == '0) begin
            state <= S_IDLE;
          end else begin
            rows_left <= rows_left - 1'b1;
            state     <= S_LOOKUP;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A refreshed slot is followed by a TROW-cycle refresh.
  a_trow: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_LOOKUP && slot_refresh != '0) |=> (state == S_REFRESH && trow_cnt == TW'(TROW - 1)));
  // Each row slot is looked up exactly once before the counter moves on.
  a_adv_once: assert property (@(posedge clk) disable iff (!rst_n)
    adv |-> busy);

  initial assert (TROW >= 1 && ROWS_PER_REF >= 1 && PEND_MAX >= 1)
    else $error("bad timing parameters");
endmodule
