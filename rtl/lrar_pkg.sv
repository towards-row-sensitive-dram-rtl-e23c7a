// lrar_pkg -- types and default sizes shared by the retention-aware refresh
// logic (LRAR: lightweight retention-time-aware refresh) that sits in a DDR4
// memory controller.
//
// The default numbers follow the design: a 15-bit row address (32,768 rows
// per bank), a weak row table (WRT) of 16 row addresses per bank, 7-bit
// cluster tags of 256 contiguous rows in the approximate mode, a 2-bit
// refresh-window flag, and the DDR4 organisation of two ranks with 4 bank
// groups of 4 banks each. Timing defaults are in memory-controller clock
// cycles of a DDR4-3200 part (1.6 GHz command clock): tREFI = 12,480 cycles
// (7.8 us). The per-row refresh and lookup costs are this design's reading
// of the ~22 ns per-row refresh and the 0.36 ns lookup (rounded to 1 ns).
package lrar_pkg;

  // Operating mode of one weak row table.
  //   MODE_DM: deterministic mode, each entry is one full weak-row address.
  //   MODE_AM: approximate mode, each entry holds two 7-bit cluster tags;
  //            a tag covers the 256 rows that share its most significant bits.
  typedef enum logic [0:0] {
    MODE_DM = 1'b0,
    MODE_AM = 1'b1
  } lrar_mode_e;

  localparam int unsigned ROW_BITS_DEF     = 15;     // 32,768 rows per bank
  localparam int unsigned WRT_ENTRIES_DEF  = 16;     // 2 x 8 expected weak rows
  localparam int unsigned CLUSTER_BITS_DEF = 7;      // MSBs kept per AM cluster
  localparam int unsigned RANKS_DEF        = 2;
  localparam int unsigned BANKS_DEF        = 16;     // 4 bank groups x 4 banks
  localparam int unsigned TREFI_DEF        = 12480;  // cycles, 7.8 us at 1.6 GHz
  localparam int unsigned REFS_PER_WINDOW  = 8192;   // REF commands per tREFW
  localparam int unsigned ROWS_PER_REF_DEF = 4;      // 32,768 rows / 8,192 REFs
  localparam int unsigned TROW_DEF         = 35;     // ~22 ns per row refresh
  localparam int unsigned PEND_MAX_DEF     = 8;      // DDR4 allows 8 postponed REFs

endpackage
