// uart_tx: serial transmitter ("uart-tx").
//
// While idle the line `tx` is high. When tx_start is seen in the idle state
// the word on `din` is loaded into a shift register and the frame is sent:
// a low start bit, DATA_BITS data bits least significant first, a parity bit
// when PARITY is not PARITY_NONE, and STOP_BITS high stop bits. Every bit
// lasts OVERSAMPLE ticks of the clock enable `en` (the baudgen output).
// `busy` is high from the start bit to the end of the last stop bit, so a
// host does not hand over a new word too early; `tx_done` is high for the
// one clock in which the last stop bit ends (it is decoded from the state,
// not registered, so the word source can advance at that same clock edge).
// In the UART core tx_done pops the transmit FIFO and tx_start is "FIFO not
// empty", so the next word is on `din` when the transmitter returns to idle
// and words stream out back to back.
//
// Timing: the start bit begins on the clock after tx_start is accepted; a
// frame is (1 + DATA_BITS + parity + STOP_BITS) * OVERSAMPLE ticks long;
// `tx` is a register output. din is only read in the accepting cycle.
//
// The frame layout and the busy flag follow the specification; the state
// machine, the counters and the parity encoding are this design's own.
module uart_tx
  import uart_pkg::*;
#(
  parameter int unsigned DATA_BITS  = 8,
  parameter parity_e     PARITY     = PARITY_EVEN,
  parameter int unsigned STOP_BITS  = 1,
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 en,        // oversampling tick
  input  logic                 tx_start,  // request to send din
  input  logic [DATA_BITS-1:0] din,
  output logic                 tx,        // serial line
  output logic                 tx_done,   // high in the last clock of the frame
  output logic                 busy
);

  if (DATA_BITS < 5 || DATA_BITS > 8) begin : g_width_check
    $error("DATA_BITS must be 5 to 8");
  end

  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP} state_e;

  localparam int unsigned SW = (OVERSAMPLE > 1) ? $clog2(OVERSAMPLE) : 1;
  localparam int unsigned NW = $clog2(DATA_BITS > STOP_BITS ? DATA_BITS : STOP_BITS) + 1;

  state_e               state;
  logic [SW-1:0]        tick_cnt;  // ticks into the current bit
  logic [NW-1:0]        bit_cnt;   // data bit / stop bit index
  logic [DATA_BITS-1:0] shreg;
  logic                 par_bit;

  wire bit_end = en && (tick_cnt == SW'(OVERSAMPLE - 1));

  always_ff @(posedge clk, posedge reset) begin
    if (reset) begin
      state    <= S_IDLE;
      tick_cnt <= '0;
      bit_cnt  <= '0;
      shreg    <= '0;
      par_bit  <= 1'b0;
      tx       <= 1'b1;
    end else begin
      if (en) tick_cnt <= bit_end ? '0 : tick_cnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          tx <= 1'b1;
          if (tx_start) begin
            shreg    <= din;
            par_bit  <= parity_of(8'(din), DATA_BITS, PARITY);
            tick_cnt <= '0;
            tx       <= 1'b0;
            state    <= S_START;
          end
        end
        S_START: if (bit_end) begin
          tx      <= shreg[0];
          bit_cnt <= '0;
          state   <= S_DATA;
        end
        S_DATA: if (bit_end) begin
          if (bit_cnt == NW'(DATA_BITS - 1)) begin
            if (PARITY != PARITY_NONE) begin
              tx    <= par_bit;
              state <= S_PARITY;
            end else begin
              tx    <= 1'b1;
              state <= S_STOP;
            end
            bit_cnt <= '0;
          end else begin
            tx      <= shreg[1];
            shreg   <= shreg >> 1;
            bit_cnt <= bit_cnt + 1'b1;
          end
        end
        S_PARITY: if (bit_end) begin
          tx      <= 1'b1;
          bit_cnt <= '0;
          state   <= S_STOP;
        end
        S_STOP: if (bit_end) begin
          if (bit_cnt == NW'(STOP_BITS - 1)) begin
            state <= S_IDLE;
          end else begin
            bit_cnt <= bit_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign tx_done = (state == S_STOP) && bit_end && (bit_cnt == NW'(STOP_BITS - 1));

  // The line is high whenever no frame is being sent.
  a_idle_high: assert property (@(posedge clk) disable iff (reset)
                                (state == S_IDLE) |-> tx);
  // tx_done comes only at the end of a frame.
  a_done_then_idle: assert property (@(posedge clk) disable iff (reset)
                                     tx_done |=> (state == S_IDLE));

endmodule
