// uart_baudgen: oversampling tick generator ("baudgen").
//
// Produces `uarten`, a pulse one sys_clk cycle wide that occurs OVERSAMPLE
// times (16 by default) in every bit time. The transmitter and receiver use
// it as a clock enable, so the whole core runs in the sys_clk domain. The
// division ratio is computed at elaboration from CLK_FREQ_HZ and BAUD_RATE:
// a different board clock only needs a different CLK_FREQ_HZ and the baud
// rate stays the same.
//
// Timing: a free-running counter counts 0 .. DIVISOR-1; uarten is high in
// the cycle in which it holds DIVISOR-1. After reset the first tick comes
// DIVISOR cycles later. Reset is asynchronous and active high.
//
// The 16x oversampling default is the one the core was specified with. The
// 50 MHz clock and 19200 baud defaults are this design's own choice.
module uart_baudgen
  import uart_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = 50_000_000,
  parameter int unsigned BAUD_RATE   = 19_200,
  parameter int unsigned OVERSAMPLE  = 16
) (
  input  logic clk,
  input  logic reset,
  output logic uarten
);

  localparam int unsigned DIVISOR = baud_divisor(CLK_FREQ_HZ, BAUD_RATE, OVERSAMPLE);
  localparam int unsigned CW      = (DIVISOR > 1) ? $clog2(DIVISOR) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk, posedge reset) begin
    if (reset) begin
      count  <= '0;
      uarten <= 1'b0;
    end else begin
      uarten <= (count == CW'(DIVISOR - 1));
      if (count == CW'(DIVISOR - 1)) count <= '0;
      else                           count <= count + 1'b1;
    end
  end

endmodule
