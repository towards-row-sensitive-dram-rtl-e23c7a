// lrar_refi_timer -- refresh interval timer of the memory controller.
//
// Emits a one-cycle ref_tick every tREFI cycles, the cadence at which the
// controller owes the DRAM one auto-refresh (AR) command. With 8,192 ticks per
// refresh window this gives the 64 ms window at the default 12,480 cycles
// (7.8 us at 1.6 GHz). When `hot` is high (device at or above 85 C) the
// interval is halved, which halves the refresh window to 32 ms as DDR4
// requires; the halving takes effect at the next reload. Using the interval
// halving as the temperature hook is this design's choice.
//
// Interface: en gates counting (the counter holds while low). ref_tick is
// registered and lasts one cycle. After reset the first tick comes TREFI
// cycles after en is first seen high.
module lrar_refi_timer #(
  parameter int unsigned TREFI = lrar_pkg::TREFI_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic hot,
  output logic ref_tick
);
  localparam int unsigned CW = $clog2(TREFI + 1);

  logic [CW-1:0] cnt;
  logic [CW-1:0] reload;

  // Count down from interval-1 to 0; tick on the cycle the counter is 0.
  always_comb reload = hot ? CW'((TREFI / 2) - 1) : CW'(TREFI - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= CW'(TREFI - 1);
      ref_tick <= 1'b0;
    end else begin
      ref_tick <= 1'b0;
      if (en) begin
        if (cnt == '0) begin
          cnt      <= reload;
          ref_tick <= 1'b1;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end

  initial assert (TREFI >= 4) else $error("TREFI too small");
endmodule
