// lrar_row_counter -- the controller-side refresh row counter.
//
// DDR4 keeps its refresh row counter inside the device; LRAR makes it visible
// to the controller so that each row due for refresh can be looked up in the
// weak row tables before it is refreshed or skipped. The counter walks the
// rows of a bank in order, one step per row slot, and wraps after the last
// row. `wrap` is high in the cycle of the step that leaves the last row, i.e.
// once per refresh window, and drives the 2-bit window flag.
//
// Interface: inc advances the count at the next clock edge; row is the row
// currently due; wrap is combinational (inc && row == last row).
module lrar_row_counter #(
  parameter int unsigned ROW_BITS = lrar_pkg::ROW_BITS_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                inc,
  output logic [ROW_BITS-1:0] row,
  output logic                wrap
);
  always_comb wrap = inc && (row == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   row <= '0;
    else if (inc) row <= row + 1'b1;
  end
endmodule
