// uart_fifo: synchronous first-in first-out buffer ("tx-fifo", "rx-fifo").
//
// It absorbs the difference between the rate at which the host system writes
// or reads words and the much lower serial rate. DEPTH words (8 by default)
// of DATA_W bits are held in a register array addressed by a write pointer
// and a read pointer; each pointer has one extra wrap bit, so equal pointers
// mean empty and pointers that differ only in the wrap bit mean full.
//
// Interface: `rdata` always shows the oldest word (first-word fall-through:
// it is read combinationally from the array), valid while `empty` is low.
// `rd` pops that word at the clock edge; `wr` pushes `wdata`. A write while
// full is dropped unless a read happens in the same cycle; a read while
// empty is ignored. `full` and `empty` are combinational from the pointers
// and change on the clock after the push or pop. DEPTH must be a power of
// two. Reset (asynchronous, active high) empties the buffer.
//
// The depth of 8 follows the specification; the pointer scheme and the
// fall-through read are this design's own choices.
module uart_fifo #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 8
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              wr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              rd,
  output logic [DATA_W-1:0] rdata,
  output logic              full,
  output logic              empty
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  if (DEPTH != (1 << AW)) begin : g_depth_check
    $error("uart_fifo: DEPTH must be a power of two");
  end

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW:0]       wptr, rptr;
  logic              do_wr, do_rd;

  assign empty = (wptr == rptr);
  assign full  = (wptr[AW-1:0] == rptr[AW-1:0]) && (wptr[AW] != rptr[AW]);
  assign do_rd = rd && !empty;
  assign do_wr = wr && (!full || do_rd);
  assign rdata = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk, posedge reset) begin
    if (reset) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  // The number of stored words never exceeds DEPTH.
  a_count: assert property (@(posedge clk) disable iff (reset)
                            (wptr - rptr) <= (AW+1)'(DEPTH));

endmodule
