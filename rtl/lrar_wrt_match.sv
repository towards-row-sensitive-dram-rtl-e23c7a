// lrar_wrt_match -- comparator bank of one weak row table (WRT).
//
// Decides, in one combinational step, whether the row that is due for refresh
// is held in the table. In deterministic mode (DM) there is one full-width
// comparator per entry: 16 comparators of 15 bits at the defaults. In
// approximate mode (AM) every entry holds two cluster tags, so the same
// storage feeds twice as many comparators of half the length: 32 comparators
// of 7 bits, each testing the 7 most significant bits of the row counter
// against one stored tag. A tag therefore covers the 256 contiguous rows
// whose upper bits it holds.
//
// Entry layout in AM (this design's packing of the two tags into one 15-bit
// word): upper tag in bits [ROW_BITS-1 -: CLUSTER_BITS], lower tag in bits
// [CLUSTER_BITS-1:0]; the bits between are unused. In DM the upper tag field
// is simply the upper bits of the stored address, which lets a full DM table
// turn into an AM table in place (see lrar_wrt).
//
// Interface: purely combinational. valid_hi qualifies the DM entry or the
// upper AM tag, valid_lo the lower AM tag. hit is high when a valid entry
// matches; hit_vec shows which entries matched (either tag in AM).
module lrar_wrt_match
  import lrar_pkg::*;
#(
  parameter int unsigned ROW_BITS     = ROW_BITS_DEF,
  parameter int unsigned ENTRIES      = WRT_ENTRIES_DEF,
  parameter int unsigned CLUSTER_BITS = CLUSTER_BITS_DEF
) (
  input  lrar_mode_e                        mode,
  input  logic [ENTRIES-1:0][ROW_BITS-1:0]  entry,
  input  logic [ENTRIES-1:0]                valid_hi,
  input  logic [ENTRIES-1:0]                valid_lo,
  input  logic [ROW_BITS-1:0]               row,
  output logic [ENTRIES-1:0]                hit_vec,
  output logic                              hit
);
  logic [CLUSTER_BITS-1:0] row_tag;

  always_comb begin
    row_tag = row[ROW_BITS-1 -: CLUSTER_BITS];
    for (int i = 0; i < ENTRIES; i++) begin
      if (mode == MODE_DM) begin
        hit_vec[i] = valid_hi[i] && (entry[i] == row);
      end else begin
        hit_vec[i] = (valid_hi[i] && (entry[i][ROW_BITS-1 -: CLUSTER_BITS] == row_tag))
                  || (valid_lo[i] && (entry[i][CLUSTER_BITS-1:0] == row_tag));
      end
    end
    hit = |hit_vec;
  end

  initial assert (2 * CLUSTER_BITS <= ROW_BITS)
    else $error("two cluster tags must fit in one row-address entry");
endmodule
