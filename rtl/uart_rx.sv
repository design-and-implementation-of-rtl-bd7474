// uart_rx: serial receiver ("uart-rx").
//
// The line `rx` is first passed through a two-flop synchronizer. In the idle
// state the receiver watches for a low level. A start bit is accepted only
// if the line stays low for half a bit time (OVERSAMPLE/2 ticks of `en`);
// a shorter low pulse is treated as a glitch and the receiver goes back to
// idle. From that mid-start-bit point the line is sampled every OVERSAMPLE
// ticks, i.e. in the middle of each following bit: DATA_BITS data bits are
// shifted in least significant bit first, then the parity bit (when PARITY
// is not PARITY_NONE) and the first stop bit. At the middle of the stop bit
// `rx_done` pulses for one clock with the word on `dout`; `parity_err` is
// valid in the same cycle and is high when the received parity bit does not
// match the data. `busy` is high while a frame is being received.
//
// Timing: rx_done comes about 2 clocks + (DATA_BITS + parity + 0.5 +
// 1) * OVERSAMPLE ticks after the falling edge of the start bit.
// dout holds its value until the next frame completes.
//
// Start-bit validation and mid-bit sampling follow the specification; the
// synchronizer, the parity check output and the state machine are this
// design's own choices.
module uart_rx
  import uart_pkg::*;
#(
  parameter int unsigned DATA_BITS  = 8,
  parameter parity_e     PARITY     = PARITY_EVEN,
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 en,          // oversampling tick
  input  logic                 rx,          // serial line (asynchronous)
  output logic [DATA_BITS-1:0] dout,
  output logic                 rx_done,     // one-cycle pulse, dout valid
  output logic                 parity_err,  // valid with rx_done
  output logic                 busy
);

  if (DATA_BITS < 5 || DATA_BITS > 8) begin : g_width_check
    $error("DATA_BITS must be 5 to 8");
  end

  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP} state_e;

  localparam int unsigned SW = (OVERSAMPLE > 1) ? $clog2(OVERSAMPLE) : 1;
  localparam int unsigned NW = $clog2(DATA_BITS) + 1;

  state_e               state;
  logic [1:0]           sync;
  logic                 rx_s;
  logic [SW-1:0]        tick_cnt;
  logic [NW-1:0]        bit_cnt;
  logic [DATA_BITS-1:0] shreg;
  logic                 par_rx;

  assign rx_s = sync[1];

  wire half_bit = en && (tick_cnt == SW'(OVERSAMPLE / 2 - 1));
  wire full_bit = en && (tick_cnt == SW'(OVERSAMPLE - 1));

  always_ff @(posedge clk, posedge reset) begin
    if (reset) begin
      sync       <= 2'b11;
      state      <= S_IDLE;
      tick_cnt   <= '0;
      bit_cnt    <= '0;
      shreg      <= '0;
      par_rx     <= 1'b0;
      dout       <= '0;
      rx_done    <= 1'b0;
      parity_err <= 1'b0;
    end else begin
      sync    <= {sync[0], rx};
      rx_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          tick_cnt <= '0;
          if (!rx_s) state <= S_START;
        end
        S_START: if (en) begin
          if (rx_s) begin
            state <= S_IDLE;           // too short: glitch, not a start bit
          end else if (half_bit) begin
            tick_cnt <= '0;
            bit_cnt  <= '0;
            state    <= S_DATA;
          end else begin
            tick_cnt <= tick_cnt + 1'b1;
          end
        end
        S_DATA: if (en) begin
          tick_cnt <= full_bit ? '0 : tick_cnt + 1'b1;
          if (full_bit) begin
            shreg <= {rx_s, shreg[DATA_BITS-1:1]};
            if (bit_cnt == NW'(DATA_BITS - 1))
              state <= (PARITY != PARITY_NONE) ? S_PARITY : S_STOP;
            else
              bit_cnt <= bit_cnt + 1'b1;
          end
        end
        S_PARITY: if (en) begin
          tick_cnt <= full_bit ? '0 : tick_cnt + 1'b1;
          if (full_bit) begin
            par_rx <= rx_s;
            state  <= S_STOP;
          end
        end
        S_STOP: if (en) begin
          tick_cnt <= full_bit ? '0 : tick_cnt + 1'b1;
          if (full_bit) begin
            dout       <= shreg;
            parity_err <= (PARITY != PARITY_NONE) &&
                          (par_rx != parity_of(8'(shreg), DATA_BITS, PARITY));
            rx_done    <= 1'b1;
            state      <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // A word is delivered only from the stop-bit state.
  a_done_from_stop: assert property (@(posedge clk) disable iff (reset)
                                     rx_done |-> $past(state == S_STOP));

endmodule
