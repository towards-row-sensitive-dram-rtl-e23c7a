// tb_lrar_window_flag -- self-checking test of the 2-bit window flag: it
// counts windows modulo 4 and full_window is high only in window 00.
module tb_lrar_window_flag;
  logic clk = 0, rst_n = 0, window_done = 0, full_window;
  logic [1:0] flag;
  int checks = 0, failures = 0, windows = 0;

  lrar_window_flag dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (400) begin
      @(negedge clk);
      if (window_done) windows++;   // pulse seen at the last rising edge
      checks++;
      if (flag != 2'(windows % 4) || full_window != (windows % 4 == 0)) begin
        failures++;
        $display("FAIL flag=%0d windows=%0d full=%0b", flag, windows, full_window);
      end
      window_done = ($urandom % 3) == 0;
    end
    checks++;
    if (windows < 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
