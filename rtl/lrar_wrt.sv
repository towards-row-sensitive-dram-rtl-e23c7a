// lrar_wrt -- weak row table (WRT) of one DRAM bank, with its mode control.
//
// Holds the rows of a bank that need the 64 ms refresh (retention time below
// 256 ms). The storage is ENTRIES words of ROW_BITS bits (16 x 15 bits at the
// defaults, 30 bytes per bank) and is used in one of two ways:
//   * DM (deterministic mode): each word is one weak-row address, 16 rows;
//   * AM (approximate mode): each word holds two CLUSTER_BITS-bit cluster tags,
//     32 clusters of 256 contiguous rows, to cover rows with variable
//     retention time (VRT) at the cost of false positives.
// The space is the same in both modes.
//
// Loading: the table is filled from offline retention profiling (and, in AM,
// offline clustering) through a simple append port. wr_row is always a full
// row address; in AM only its upper CLUSTER_BITS bits are kept. AM slots fill
// the upper tags of entries 0..N-1 first, then the lower tags. The table has
// no comparators of its own for loading (the only comparators are the
// lookup bank in lrar_wrt_match), so it does not detect duplicates: the
// loader should write each row or cluster once.
//
// Temperature scaling: the table has twice the expected number of weak rows
// so that rows which turn weak with temperature or age fit in DM. When a DM
// write finds the table full and temp_scale_en is set, the table switches to
// AM in place: the upper bits of each stored address already sit in the
// upper-tag field, so every stored row becomes the cluster that contains it,
// the lower-tag fields become free, and the new row is added as a cluster
// in the first lower tag. Stored rows that share a cluster keep one tag each.
// This keeps every affected row covered. Without temp_scale_en, or when the
// AM table is full, the write is dropped and `dropped` pulses.
//
// set_mode loads an explicit mode and empties the table; clear empties it and
// keeps the mode. Reset: empty table in DM. The per-slot valid bits and the
// fill counter are this design's additions to the 16 x 15-bit storage.
//
// Timing: writes, clear and set_mode take effect at the next clock edge;
// to_am and dropped are registered one-cycle pulses.
module lrar_wrt
  import lrar_pkg::*;
#(
  parameter int unsigned ROW_BITS     = ROW_BITS_DEF,
  parameter int unsigned ENTRIES      = WRT_ENTRIES_DEF,
  parameter int unsigned CLUSTER_BITS = CLUSTER_BITS_DEF,
  localparam int unsigned SW          = $clog2(2 * ENTRIES + 1)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              clear,
  input  logic                              set_mode,
  input  lrar_mode_e                        new_mode,
  input  logic                              temp_scale_en,
  input  logic                              wr_en,
  input  logic [ROW_BITS-1:0]               wr_row,
  output lrar_mode_e                        mode,
  output logic [ENTRIES-1:0][ROW_BITS-1:0]  entry,
  output logic [ENTRIES-1:0]                valid_hi,
  output logic [ENTRIES-1:0]                valid_lo,
  output logic [SW-1:0]                     used,
  output logic                              to_am,
  output logic                              dropped
);
  localparam logic [SW-1:0] DM_SLOTS = SW'(ENTRIES);
  localparam logic [SW-1:0] AM_SLOTS = SW'(2 * ENTRIES);

  logic [CLUSTER_BITS-1:0] wr_tag;

  assign wr_tag = wr_row[ROW_BITS-1 -: CLUSTER_BITS];

  // AM tag insertion: which slot, and whether this write inserts one.
  // Upper tags of entries 0..N-1 are slots 0..N-1, lower tags slots N..2N-1.
  logic          put;
  logic [SW-1:0] put_slot;
  logic [$clog2(ENTRIES)-1:0] put_idx;

  always_comb begin
    put      = 1'b0;
    put_slot = used;
    if (wr_en && !set_mode && !clear) begin
      if (mode == MODE_AM && used < AM_SLOTS) begin
        put = 1'b1;
      end else if (mode == MODE_DM && used >= DM_SLOTS && temp_scale_en) begin
        put      = 1'b1;
        put_slot = DM_SLOTS;
      end
    end
    put_idx = put_slot[$clog2(ENTRIES)-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= MODE_DM;
      entry    <= '0;
      valid_hi <= '0;
      valid_lo <= '0;
      used     <= '0;
      to_am    <= 1'b0;
      dropped  <= 1'b0;
    end else begin
      to_am   <= 1'b0;
      dropped <= 1'b0;
      if (set_mode || clear) begin
        if (set_mode) mode <= new_mode;
        valid_hi <= '0;
        valid_lo <= '0;
        used     <= '0;
      end else if (wr_en) begin
        if (mode == MODE_DM) begin
          if (used < DM_SLOTS) begin
            entry[used[$clog2(ENTRIES)-1:0]]    <= wr_row;
            valid_hi[used[$clog2(ENTRIES)-1:0]] <= 1'b1;
            used <= used + 1'b1;
          end else if (temp_scale_en) begin
            // Full in DM: fall back to AM in place. The stored rows become
            // clusters in the upper-tag fields; slot ENTRIES is next free.
            mode     <= MODE_AM;
            valid_lo <= '0;
            to_am    <= 1'b1;
            used     <= DM_SLOTS + 1'b1;
          end else begin
            dropped <= 1'b1;
          end
        end else begin
          if (used < AM_SLOTS) begin
            used <= used + 1'b1;
          end else begin
            dropped <= 1'b1;
          end
        end
      end
      if (put) begin
        if (put_slot < DM_SLOTS) begin
          entry[put_idx]    <= {wr_tag, (ROW_BITS - CLUSTER_BITS)'(0)};
          valid_hi[put_idx] <= 1'b1;
        end else begin
          entry[put_idx][CLUSTER_BITS-1:0] <= wr_tag;
          valid_lo[put_idx]                <= 1'b1;
        end
      end
    end
  end

  initial assert (ENTRIES >= 2 && (ENTRIES & (ENTRIES - 1)) == 0)
    else $error("ENTRIES must be a power of two");
endmodule
