// tb_uart_serial_mon: behavioural serial-line monitor used by the testbenches.
//
// Watches `line` for a low level, then counts ticks of the oversampling
// enable `en` and samples the line in the middle of each bit: half a bit
// after the falling edge (start bit, must still be low), then one bit time
// apart for DATA_BITS data bits (least significant first), the parity bit if
// PARITY is not PARITY_NONE, and STOP_BITS stop bits. When the frame is
// complete `valid` is high for one clock with the decoded word, whether the
// parity bit matched (`par_ok`) and whether every stop bit was high
// (`stop_ok`). It decodes independently of the design's receiver.
module tb_uart_serial_mon
  import uart_pkg::*;
#(
  parameter int unsigned DATA_BITS  = 8,
  parameter parity_e     PARITY     = PARITY_EVEN,
  parameter int unsigned STOP_BITS  = 1,
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic       clk,
  input  logic       en,
  input  logic       line,
  output logic       valid,
  output logic [7:0] data,
  output logic       par_ok,
  output logic       stop_ok,
  output logic       start_ok
);

  initial begin
    logic [7:0] d;
    logic       ones, p_ok, s_ok, st_ok;
    valid    = 1'b0;
    data     = '0;
    par_ok   = 1'b0;
    stop_ok  = 1'b0;
    start_ok = 1'b0;
    forever begin
      @(posedge clk iff (line == 1'b0));
      repeat (OVERSAMPLE / 2) @(posedge clk iff en);
      st_ok = (line == 1'b0);
      d     = '0;
      ones  = 1'b0;
      for (int i = 0; i < int'(DATA_BITS); i++) begin
        repeat (OVERSAMPLE) @(posedge clk iff en);
        d[i] = line;
        ones ^= line;
      end
      p_ok = 1'b1;
      if (PARITY != PARITY_NONE) begin
        repeat (OVERSAMPLE) @(posedge clk iff en);
        p_ok = ((ones ^ line) == ((PARITY == PARITY_ODD) ? 1'b1 : 1'b0));
      end
      s_ok = 1'b1;
      for (int s = 0; s < int'(STOP_BITS); s++) begin
        repeat (OVERSAMPLE) @(posedge clk iff en);
        if (line != 1'b1) s_ok = 1'b0;
      end
      // present the result between clock edges so that exactly one
      // rising edge sees valid high
      @(negedge clk);
      data     = d;
      par_ok   = p_ok;
      stop_ok  = s_ok;
      start_ok = st_ok;
      valid    = 1'b1;
      @(negedge clk);
      valid    = 1'b0;
    end
  end

endmodule
