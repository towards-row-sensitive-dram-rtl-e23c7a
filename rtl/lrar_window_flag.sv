// lrar_window_flag -- the 2-bit global refresh-window flag of LRAR.
//
// Counts refresh windows (64 ms each, 32 ms when hot). It advances once per
// completed window and, being two bits, returns to 00 every fourth window,
// i.e. every 256 ms. While the flag is 00 every row is refreshed (the full
// refresh); in windows 01, 10 and 11 only rows found in the weak row tables
// are refreshed and all others are skipped, so strong rows are refreshed
// every 256 ms and weak rows every 64 ms.
//
// Interface: window_done is a one-cycle pulse at the end of a window;
// full_window is high while the flag is 00. Reset sets the flag to 00, so the
// first window after reset is a full refresh (this design's choice).
module lrar_window_flag (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       window_done,
  output logic [1:0] flag,
  output logic       full_window
);
  always_comb full_window = (flag == 2'b00);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           flag <= 2'b00;
    else if (window_done) flag <= flag + 2'b01;
  end
endmodule
