# LRAR: retention-aware auto-refresh for a DDR4 memory controller

A DDR4 device must see every row refreshed within the refresh window
(tREFW, 64 ms; 32 ms at 85 °C and above). That window is set by the weakest
cells, yet only a handful of rows per bank actually lose data in less than
256 ms. This RTL refreshes **weak rows every 64 ms and all other rows only
every 256 ms**. Each REF slot that carries no weak row is skipped, and the
rank is free for reads and writes during the time the refresh would have
taken.

The controller keeps a small **weak row table (WRT)** per bank. It also
keeps a **2-bit window flag** per rank, which counts 64 ms windows:

| flag | what is refreshed                                           |
|------|-------------------------------------------------------------|
| 00   | every row of every bank (the full refresh, once per 256 ms) |
| 01, 10, 11 | only rows that the bank's WRT names; all others skipped |

The table works in one of two modes, and both use the same storage of
16 words × 15 bits per bank:

* **Deterministic mode (DM).** Each word is one weak-row address. That is
  16 rows, twice the roughly 8 weak rows expected in a 32,768-row bank
  (per-row weak probability 2.3·10⁻⁴). The spare half absorbs rows that
  turn weak with temperature or age.
* **Approximate mode (AM).** Each word holds two 7-bit *cluster tags*,
  32 in all. A tag names the 256 contiguous rows that share those 7
  most-significant bits. This covers rows with variable retention time
  (VRT), whose set changes too often to profile. The price is false
  positives: strong rows inside a cluster are refreshed too. Rows outside
  every cluster are left to the DRAM's ECC.

When a DM table overflows under temperature scaling, it turns into an AM
table in place, so that every affected row stays covered (see below).

## How one refresh command is processed

The timer (`lrar_refi_timer`) ticks every tREFI: 12,480 cycles, which is
7.8 µs at the 1.6 GHz command clock of DDR4-3200. There are 8,192 ticks per
window, so each tick covers 32,768 / 8,192 = **4 row slots** of each rank.
For each slot the rank sequencer (`lrar_rank_refresh`) does this:

1. **Lookup, 1 cycle.** The row counter value goes to the comparator bank
   of every bank of the rank at once (`lrar_wrt_match`). The refresh mask
   is all ones while the flag is 00; otherwise it is the per-bank hit
   vector. `slot_valid`, `slot_row` and `slot_refresh` show the decision
   in this cycle.
2. **Refresh, `TROW` = 35 cycles (about 22 ns)**, only if any bank needs
   the row. During this time `busy` is high and the rank is blocked. If no
   bank needs the row, the slot is over after the lookup cycle.
3. **Advance the row counter.** When the counter wraps past the last row,
   a window has ended and the flag is incremented.

```
ref_tick  _|‾|______________________________________________
state      IDLE|L|REFRESH(35)......|L|L|L|REFRESH(35)......|IDLE
slot_refresh    m0                  0 0 m3
                 ^ weak row in some bank   ^ skipped slots cost 1 cycle each
```

A refresh that skips a slot blocks the rank for 1 cycle instead of 36. At
the defaults the longest command (flag 00) takes 4 × 36 = 144 cycles, far
below tREFI. REF ticks that arrive while the rank is still busy are queued
as *postponed* refreshes, up to 8 (the DDR4 limit). A tick beyond that is
lost and `ref_overflow` pulses. This can only happen with a tREFI shortened
far below the default.

## The weak row table in detail (`lrar_wrt`, `lrar_wrt_match`)

Word layout, 15 bits:

```
DM:  [14 ........................ 0]  full row address
AM:  [14 ...... 8][7][6 ......... 0]
      upper tag   --  lower tag        (each tag = row[14:8] of a cluster)
```

Each word has two valid bits: one for the DM entry or upper tag, one for
the lower tag. In DM, 16 comparators of 15 bits match the row counter
against the stored addresses. In AM, the same words feed 32 comparators of
7 bits, each matching `row[14:8]` against one tag. The comparator length
halves and the count doubles, but the storage stays the same.

**Loading.** The table is filled through an append port (`cfg_wr_en`,
`cfg_row`). The input is always a full row address; in AM only its upper
7 bits are kept. AM tags fill the upper halves of words 0–15 first, then
the lower halves. `cfg_set_mode` selects a mode and empties the table;
`cfg_clear` empties it and keeps the mode. The table has no comparators of
its own for loading, so it does not detect repeated writes: write each row
or cluster once.

**DM → AM fallback.** A DM write may arrive when all 16 entries are full.
If `temp_scale_en` is set, the table switches to AM in that same cycle:

* the upper 7 bits of each stored address already sit in the upper-tag
  field, so each stored weak row becomes the cluster that contains it;
* the lower-tag fields are free;
* the new row's cluster goes into the first lower tag.

No rows move, and nothing is lost. Stored rows that share a cluster each
keep their own tag. `to_am` pulses when the switch happens. A write that
does not fit is dropped and `dropped` pulses. That is a DM write on a full
table without `temp_scale_en`, or any write on a full AM table (32 tags).

## Hierarchy and interface

```
lrar_top                       timer + one sequencer per rank
├── lrar_refi_timer            tREFI tick, halved when `hot`
└── lrar_rank_refresh  ×RANKS  slot sequencer, refresh/skip mux, REF queue
    ├── lrar_row_counter       controller-visible refresh row counter
    ├── lrar_window_flag       2-bit flag, 00 = full-refresh window
    └── per bank ×NUM_BANKS
        ├── lrar_wrt           table storage, loading, mode, fallback
        └── lrar_wrt_match     16×15-bit / 32×7-bit comparator bank
lrar_pkg                       mode enum, default sizes
```

`lrar_top` ports:

* Inputs:
  * `en`: runs the timer.
  * `hot`: halves tREFI, giving a 32 ms window.
  * `temp_scale_en`: allows the DM → AM fallback.
  * `cfg_rank`, `cfg_bank`, `cfg_wr_en`, `cfg_row`, `cfg_set_mode`,
    `cfg_mode`, `cfg_clear`: load the tables.
* Outputs, per rank:
  * `busy`: the rank is blocked by refresh.
  * `slot_valid`, `slot_row`, `slot_refresh`: the decision for each row
    slot. `slot_refresh` is the mask of banks to refresh; 0 means skipped.
  * `window_flag`.
  * `pending`: postponed REFs.
  * `ref_overflow`.
  * `bank_mode`, `bank_to_am`, `bank_dropped`.
  * Running counters `slots_refreshed` and `slots_skipped`.

The unit decides which rows are refreshed. A DRAM command scheduler turns
the decisions into commands, and that scheduler is not part of this RTL.
The reset is asynchronous and active low. After reset every table is empty
in DM, and the first window is a full refresh.

## Parameters

| parameter      | default | origin |
|----------------|---------|--------|
| `RANKS`        | 2       | evaluated DDR4 configuration |
| `NUM_BANKS`    | 16      | 4 bank groups × 4 banks |
| `ROW_BITS`     | 15      | 15-bit row address, 32,768 rows per bank |
| `ENTRIES`      | 16      | 2 × the ~8 expected weak rows |
| `CLUSTER_BITS` | 7       | 7 MSBs per cluster, 256-row clusters |
| `TREFI`        | 12,480  | 7.8 µs in 1.6 GHz cycles |
| `ROWS_PER_REF` | 4       | 32,768 rows / 8,192 REF per window (JEDEC 8K) |
| `TROW`         | 35      | ~22 ns per row refresh at 1.6 GHz |
| `PEND_MAX`     | 8       | DDR4 postponed-refresh limit |

`2*CLUSTER_BITS <= ROW_BITS` is required, and `ENTRIES` must be a power of
two. A cluster covers `2**(ROW_BITS-CLUSTER_BITS)` rows.

## What is fixed by the design and what is a choice here

These parts follow the LRAR scheme directly:

* the per-bank 16 × 15-bit table;
* the 7-bit clusters and the 32 × 7-bit comparators of AM;
* the 2-bit flag, with full refresh at 00 and weak rows only otherwise;
* refreshing weak rows every 64 ms and the others every 256 ms;
* the 1-cycle lookup cost of a skipped row;
* the fallback to AM when temperature scaling overflows the table.

These are choices made in this RTL:

* **Cluster packing and in-place fallback.** The two tags of a word sit in
  bits 14:8 and 6:0, and the DM → AM switch converts in place.
* **Valid bits and fill counter.** Two valid bits per word and a fill
  counter are added. The bare 30.25-byte budget (240 table bits plus the
  2-bit flag) would let an empty entry match row 0.
* **Flag timing.** The flag advances on the row-counter wrap rather than on
  a separate 64 ms timer, so it follows the 32 ms hot window on its own.
* **Hot operation.** `hot` halves tREFI. That is how the 32 ms
  high-temperature window is reached.
* **Shared row counter.** All banks of a rank share the row counter (all-bank
  auto refresh). A slot is refreshed in the banks that need it and is
  skipped only if none does.
* **Refresh timing.** A refreshed row costs a flat 35 cycles (22 ns). The
  evaluated configuration also quotes a tRFC of 560 cycles per REF, which
  would be ~140 cycles per row. The 22 ns figure was used, because the
  blocking-time savings are stated per row on that basis. Change `TROW` to
  model the other reading.
* **Row count.** The evaluated configuration also lists 65,536 rows per
  bank. The design's 15-bit entries and 7 + 8-bit cluster split assume
  32,768, and that is the default. `ROW_BITS=16, CLUSTER_BITS=8` models the
  larger bank.
* **Table organisation.** There is one table per bank and one flag per
  rank. A statement that the number of tables equals the number of ranks
  was read as referring to the flags.
* **REF queue.** A queue of postponed REFs was added.

These are outside this RTL: retention profiling, the clustering that picks
the AM tags (K-means or density based, done offline), the DRAM device, its
ECC and the command scheduler.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_lrar_refi_timer` | tick spacing normal / hot; no ticks when disabled |
| `tb_lrar_row_counter` | two full 15-bit passes; wrap exactly at the last row |
| `tb_lrar_window_flag` | flag modulo 4; full window only at 00 |
| `tb_lrar_wrt_match` | random DM and AM tables against a list-based reference |
| `tb_lrar_wrt` | loading, repeats, drops, fallback, clear, set_mode; compares row coverage against a model |
| `tb_lrar_rank_refresh` | 4 banks in DM, AM, fallback and empty states over five windows. Every slot's row and mask, lookup spacing (1 or 36 cycles), queue overflow and counters |
| `tb_lrar_top` | 2 ranks × 16 banks, 13-bit rows, tREFI 160, six windows. Counts each mechanism (full refresh, DM hit, AM hit, skip, fallback, drop, hot interval, postponed and lost REF, flag wrap) and fails if one never occurs |
| `tb_lrar_top_full` | all defaults, about 153 M cycles (about 4 minutes in Verilator). One 64 ms full-refresh window, then a 32 ms hot window with table rows only. Every slot, tick spacing and counters; no REF lost |
| `tb_lrar_workloads` | full-size rows, one 256 ms flag cycle, described below |

`tb_lrar_workloads` runs two table workloads:

* Random weak rows at 2.3·10⁻⁴ per row in DM: 105 rows over 16 banks, and
  **75.0 % fewer row refreshes** than plain auto-refresh.
* 25 % randomly placed VRT rows, with the 32 densest clusters loaded in AM:
  **56.2 % fewer row refreshes**. Those clusters refresh 28.6 % of the VRT
  rows every 64 ms. Uniform placement is the worst case for clustering.

Both figures are counted by the hardware and checked against the model.

Simulate any testbench with plain Verilator from the project root:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/lrar_pkg.sv tb/tb_lrar_top.sv --top-module tb_lrar_top -o sim
./obj_dir/sim
```
