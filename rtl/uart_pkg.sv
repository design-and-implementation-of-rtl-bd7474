// uart_pkg: types and helper functions shared by the UART core.
//
// parity_e selects the optional parity bit that follows the data bits of a
// frame. The frame itself (start bit low, data LSB first, optional parity,
// one or more stop bits high) follows the usual asynchronous serial format.
// baud_divisor() turns a clock frequency and a baud rate into the number of
// system clocks between two oversampling ticks, rounded to the nearest
// integer, so that the baud rate follows the clock frequency given as a
// parameter. parity_of() gives the parity bit for a data word.
package uart_pkg;

  typedef enum logic [1:0] {
    PARITY_NONE = 2'd0,
    PARITY_EVEN = 2'd1,  // parity bit makes the number of ones even
    PARITY_ODD  = 2'd2   // parity bit makes the number of ones odd
  } parity_e;

  // System clocks per oversampling tick, rounded to nearest, at least 1.
  function automatic int unsigned baud_divisor(int unsigned clk_hz,
                                               int unsigned baud,
                                               int unsigned oversample);
    longint unsigned d, per_tick;
    per_tick = 64'(baud) * 64'(oversample);
    d = (64'(clk_hz) + per_tick / 2) / per_tick;
    return (d == 0) ? 1 : int'(d);
  endfunction

  // Parity bit sent after the data bits of `data` (only the low `nbits`
  // bits count).
  function automatic logic parity_of(logic [7:0] data, int unsigned nbits,
                                     parity_e mode);
    logic p;
    p = 1'b0;
    for (int i = 0; i < 8; i++)
      if (i < nbits) p ^= data[i];
    return (mode == PARITY_ODD) ? ~p : p;
  endfunction

endpackage
