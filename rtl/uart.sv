// uart: complete UART core, a transmitter and a receiver with buffers.
//
// Five parts, all clocked by sys_clk:
//   baudgen  - makes the 16x-oversampling enable `uarten` from sys_clk;
//   uart_rx  - turns frames arriving on `rx` into parallel words;
//   rx_fifo  - buffers received words until the host reads them;
//   tx_fifo  - buffers words written by the host until they are sent;
//   uart_tx  - turns words into frames on `tx`.
// The host writes a word by presenting it on wr_data and pulsing wr_uart
// (ignored while tx_full is high). The transmitter starts a frame whenever
// the transmit FIFO is not empty (tx_start = !empty) and pops the word with
// its tx_done pulse when the frame ends. The receiver pushes each word into
// the receive FIFO with its rx_done pulse; when that FIFO is full the word
// is lost (its full flag is left unconnected). The host sees the oldest
// received word on rd_data while rx_empty is low and pulses rd_uart to
// remove it. rd_parity_err travels with each word through the receive FIFO
// and is high for a word whose parity bit was wrong.
//
// The block structure, the connections (including the unconnected full flag
// of the receive FIFO) and the host port names follow the original block
// diagram and top-level symbol. The serial pins rx and tx are ports here, as
// in the block diagram. The parity flag on the read side, the frame options
// and the asynchronous active-high reset are this design's own additions and
// choices. The busy outputs of the receiver and transmitter and the full
// flag of the receive FIFO are left unused on purpose (the host's flow
// control is tx_full and rx_empty), so a lint tool reports them as unused
// signals. All ports are plain signals; words on rd_data/wr_data are
// DATA_BITS wide.
module uart
  import uart_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = 50_000_000,
  parameter int unsigned BAUD_RATE   = 19_200,
  parameter int unsigned OVERSAMPLE  = 16,
  parameter int unsigned DATA_BITS   = 8,
  parameter parity_e     PARITY      = PARITY_EVEN,
  parameter int unsigned STOP_BITS   = 1,
  parameter int unsigned FIFO_DEPTH  = 8
) (
  input  logic                 sys_clk,
  input  logic                 reset,
  // host side, transmit
  input  logic                 wr_uart,
  input  logic [DATA_BITS-1:0] wr_data,
  output logic                 tx_full,
  // host side, receive
  input  logic                 rd_uart,
  output logic [DATA_BITS-1:0] rd_data,
  output logic                 rd_parity_err,
  output logic                 rx_empty,
  // serial side
  input  logic                 rx,
  output logic                 tx
);

  logic                 uarten;
  logic [DATA_BITS-1:0] rx_dout, tx_din;
  logic                 rx_done, rx_parity_err;
  logic                 tx_done, tx_fifo_empty;
  logic                 rx_fifo_full;  // not used: overflowing words are dropped
  logic                 rx_busy, tx_busy;  // not used at this level

  uart_baudgen #(
    .CLK_FREQ_HZ(CLK_FREQ_HZ), .BAUD_RATE(BAUD_RATE), .OVERSAMPLE(OVERSAMPLE)
  ) u_baudgen (
    .clk(sys_clk), .reset(reset), .uarten(uarten)
  );

  uart_rx #(
    .DATA_BITS(DATA_BITS), .PARITY(PARITY), .OVERSAMPLE(OVERSAMPLE)
  ) u_rx (
    .clk(sys_clk), .reset(reset), .en(uarten), .rx(rx),
    .dout(rx_dout), .rx_done(rx_done), .parity_err(rx_parity_err), .busy(rx_busy)
  );

  uart_fifo #(
    .DATA_W(DATA_BITS + 1), .DEPTH(FIFO_DEPTH)
  ) u_rx_fifo (
    .clk(sys_clk), .reset(reset),
    .wr(rx_done), .wdata({rx_parity_err, rx_dout}),
    .rd(rd_uart), .rdata({rd_parity_err, rd_data}),
    .full(rx_fifo_full), .empty(rx_empty)
  );

  uart_fifo #(
    .DATA_W(DATA_BITS), .DEPTH(FIFO_DEPTH)
  ) u_tx_fifo (
    .clk(sys_clk), .reset(reset),
    .wr(wr_uart), .wdata(wr_data),
    .rd(tx_done), .rdata(tx_din),
    .full(tx_full), .empty(tx_fifo_empty)
  );

  uart_tx #(
    .DATA_BITS(DATA_BITS), .PARITY(PARITY), .STOP_BITS(STOP_BITS), .OVERSAMPLE(OVERSAMPLE)
  ) u_tx (
    .clk(sys_clk), .reset(reset), .en(uarten),
    .tx_start(!tx_fifo_empty), .din(tx_din),
    .tx(tx), .tx_done(tx_done), .busy(tx_busy)
  );

endmodule
