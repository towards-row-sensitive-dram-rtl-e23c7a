// tb_lrar_row_counter -- self-checking test of the refresh row counter at its
// full 15-bit size: random advance pattern over two full passes, checking the
// row value against a model and that wrap fires exactly at the last row.
module tb_lrar_row_counter;
  localparam int unsigned ROW_BITS = 15;
  logic clk = 0, rst_n = 0, inc = 0, wrap;
  logic [ROW_BITS-1:0] row;
  int checks = 0, failures = 0, wraps = 0;
  int unsigned model = 0;

  lrar_row_counter #(.ROW_BITS(ROW_BITS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (wraps < 2) begin
      @(negedge clk);
      // the increment applied at the last rising edge
      if (inc) model = (model + 1) % (1 << ROW_BITS);
      inc = ($urandom % 4) != 0;
      #1;
      checks++;
      if (row != ROW_BITS'(model) || wrap != (inc && model == (1 << ROW_BITS) - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL row=%0d model=%0d wrap=%0b", row, model, wrap);
      end
      if (wrap) wraps++;
    end
    checks++;
    if (wraps != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
