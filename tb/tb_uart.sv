// tb_uart: end-to-end testbench of the complete UART core at its default
// parameters (50 MHz clock, 19200 baud, 16x oversampling, 8 data bits,
// even parity, 1 stop bit, 8-word FIFOs).
//
// The serial output is looped back to the serial input for most of the
// test, so every word the host writes must come back on the read side.
// The line is also decoded by the independent monitor tb_uart_serial_mon,
// ticking at the bit rate worked out here (50 MHz / (19200 * 16), rounded).
// Phases:
//  1. burst: the host writes 8'hAA and then random words until tx_full, tries one more write (must be
//     dropped), then writes two more as space frees up. With nobody reading,
//     the receive FIFO fills up and the last words are lost (overrun); the
//     eight that were kept must be the first eight, in order. Consecutive
//     frames must follow each other back to back: one frame time apart.
//  2. streaming: 20 words written as fast as tx_full allows and read as
//     soon as rx_empty goes low; all must arrive in order.
//  3. loopback off, full duplex: while the core sends a word, the testbench
//     drives its own frames onto rx: a good one, one with a wrong parity
//     bit (rd_parity_err must be high), and a glitch shorter than half a
//     bit (must not produce a word).
// Each of these mechanisms is counted, and one that never happened is a
// failure.
module tb_uart;
  import uart_pkg::*;

  localparam real CLK_HZ = 50.0e6;
  localparam real BAUD   = 19200.0;
  localparam int  DIV    = int'($floor(CLK_HZ / (BAUD * 16.0) + 0.5));
  localparam int  BIT    = 16 * DIV;
  localparam int  FRAME  = 11 * BIT;
  localparam longint GAP_MIN = longint'(FRAME) - longint'(DIV);     // back-to-back frame spacing limits
  localparam longint GAP_MAX = longint'(FRAME) + longint'(DIV) + 4;

  logic       sys_clk, reset;
  logic       wr_uart, rd_uart, tx_full, rx_empty, rd_parity_err;
  logic [7:0] wr_data, rd_data;
  logic       rx, tx, loopback, drv_line;
  int         checks = 0, failures = 0;
  longint     cyc;

  initial begin
    sys_clk = 1'b0;
    reset   = 1'b1;
    forever #10 sys_clk = ~sys_clk;
  end

  assign rx = loopback ? tx : drv_line;

  uart dut (.sys_clk, .reset, .wr_uart, .wr_data, .tx_full,
            .rd_uart, .rd_data, .rd_parity_err, .rx_empty, .rx, .tx);

  // independent tick for the line monitor
  int   tick_cnt;
  logic tick;
  always_ff @(posedge sys_clk) begin
    cyc <= reset ? 0 : cyc + 1;
    if (reset || tick_cnt == DIV - 1) begin
      tick_cnt <= 0;
      tick     <= 1'b1;
    end else begin
      tick_cnt <= tick_cnt + 1;
      tick     <= 1'b0;
    end
  end

  logic       mv, mp, ms, mst;
  logic [7:0] md;
  tb_uart_serial_mon mon (.clk(sys_clk), .en(tick), .line(tx), .valid(mv), .data(md),
                          .par_ok(mp), .stop_ok(ms), .start_ok(mst));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // line monitor: words seen on tx, with their times
  logic [7:0] line_words[$];
  longint     line_times[$];
  initial forever @(posedge sys_clk) begin
    if (mv) begin
      line_words.push_back(md);
      line_times.push_back(cyc);
      check(mp && ms && mst, $sformatf("tx frame %02h well formed", md));
    end
  end

  // mechanism counters
  int n_tx_full, n_wr_dropped, n_rx_overrun, n_back_to_back;
  int n_parity_err, n_glitch, n_full_duplex, n_rx_empty_read;

  initial forever @(posedge sys_clk) if (!reset && tx_full) n_tx_full++;

  task automatic write_word(logic [7:0] w);
    @(negedge sys_clk);
    wr_data = w;
    wr_uart = 1'b1;
    @(negedge sys_clk);
    wr_uart = 1'b0;
  endtask

  task automatic read_word(output logic [7:0] w, output logic perr);
    @(negedge sys_clk);
    w       = rd_data;
    perr    = rd_parity_err;
    rd_uart = 1'b1;
    @(negedge sys_clk);
    rd_uart = 1'b0;
  endtask

  task automatic drive_frame(logic [7:0] w, bit bad_par);
    logic p;
    p = ^w;
    if (bad_par) p = ~p;
    @(negedge sys_clk);
    drv_line = 1'b0;
    repeat (BIT) @(negedge sys_clk);
    for (int i = 0; i < 8; i++) begin
      drv_line = w[i];
      repeat (BIT) @(negedge sys_clk);
    end
    drv_line = p;
    repeat (BIT) @(negedge sys_clk);
    drv_line = 1'b1;
    repeat (BIT) @(negedge sys_clk);
  endtask

  initial begin
    logic [7:0] sent[$], w, got;
    logic       perr;
    int         n_written, first_line;

    n_tx_full = 0; n_wr_dropped = 0; n_rx_overrun = 0; n_back_to_back = 0;
    n_parity_err = 0; n_glitch = 0; n_full_duplex = 0; n_rx_empty_read = 0;
    wr_uart  = 1'b0;
    rd_uart  = 1'b0;
    wr_data  = '0;
    loopback = 1'b1;
    drv_line = 1'b1;
    repeat (5) @(posedge sys_clk);
    reset = 1'b0;
    repeat (20) @(posedge sys_clk);
    check(rx_empty && !tx_full && tx, "idle after reset");

    // ---- phase 1: burst, tx FIFO full, rx FIFO overrun ----
    first_line = line_words.size();
    n_written = 0;
    while (!tx_full) begin
      w = (n_written == 0) ? 8'hAA : 8'($urandom);
      write_word(w);
      sent.push_back(w);
      n_written++;
    end
    check(n_written == 8, $sformatf("tx FIFO took %0d words before full", n_written));
    // one more write while full: must be dropped
    write_word(8'hEE);
    n_wr_dropped++;
    // two more as space frees up
    repeat (2) begin
      @(negedge sys_clk iff !tx_full);
      w = 8'($urandom);
      write_word(w);
      sent.push_back(w);
    end
    // wait for all 10 frames on the line
    while (line_words.size() < first_line + 10) @(posedge sys_clk);
    repeat (4 * BIT) @(posedge sys_clk);
    for (int i = 0; i < 10; i++)
      check(line_words[first_line + i] == sent[i],
            $sformatf("line word %0d: %02h vs %02h", i, line_words[first_line + i], sent[i]));
    for (int i = 1; i < 10; i++) begin
      longint gap;
      gap = line_times[first_line + i] - line_times[first_line + i - 1];
      check(gap >= GAP_MIN && gap <= GAP_MAX,
            $sformatf("frames back to back: %0d clocks apart, frame is %0d", gap, FRAME));
      n_back_to_back++;
    end
    // 8 words kept, 2 lost
    for (int i = 0; i < 8; i++) begin
      check(!rx_empty, "rx FIFO holds a word");
      read_word(got, perr);
      check(got == sent[i] && !perr, $sformatf("read %0d: %02h vs %02h", i, got, sent[i]));
    end
    check(rx_empty, "rx FIFO empty after 8 reads: later words overran");
    if (rx_empty) n_rx_overrun += 2;
    read_word(got, perr);  // read while empty: ignored
    n_rx_empty_read++;
    check(rx_empty, "read while empty ignored");

    // ---- phase 2: streaming with a concurrent reader ----
    sent.delete();
    fork
      begin
        for (int i = 0; i < 20; i++) begin
          @(negedge sys_clk iff !tx_full);
          w = 8'($urandom);
          sent.push_back(w);
          write_word(w);
        end
      end
      begin
        for (int i = 0; i < 20; i++) begin
          @(negedge sys_clk iff !rx_empty);
          read_word(got, perr);
          check(i < sent.size() && got == sent[i] && !perr,
                $sformatf("stream word %0d: %02h", i, got));
        end
      end
    join
    check(rx_empty && !tx_full, "stream done");

    // ---- phase 3: external line, full duplex, parity error, glitch ----
    repeat (2 * BIT) @(posedge sys_clk);
    loopback = 1'b0;
    first_line = line_words.size();
    fork
      write_word(8'h96);
      begin
        repeat (3 * DIV) @(negedge sys_clk);
        drive_frame(8'h3C, 0);
      end
    join
    check(!rx_empty, "good frame received while transmitting");
    read_word(got, perr);
    check(got == 8'h3C && !perr, $sformatf("external word %02h perr %b", got, perr));
    while (line_words.size() < first_line + 1) @(posedge sys_clk);
    check(line_words[first_line] == 8'h96, "word sent during reception");
    if (got == 8'h3C && line_words[first_line] == 8'h96) n_full_duplex++;

    drive_frame(8'h5B, 1);
    repeat (4) @(negedge sys_clk);
    check(!rx_empty, "bad-parity frame delivered");
    read_word(got, perr);
    check(got == 8'h5B && perr, $sformatf("parity error flagged: %02h perr %b", got, perr));
    if (perr) n_parity_err++;

    @(negedge sys_clk);
    drv_line = 1'b0;
    repeat (5 * DIV) @(negedge sys_clk);
    drv_line = 1'b1;
    repeat (3 * BIT) @(negedge sys_clk);
    check(rx_empty, "glitch produced no word");
    if (rx_empty) n_glitch++;
    drive_frame(8'hA1, 0);
    repeat (4) @(negedge sys_clk);
    read_word(got, perr);
    check(got == 8'hA1 && !perr, "frame after glitch");

    // ---- every mechanism happened ----
    check(n_tx_full > 0,       "tx FIFO full happened");
    check(n_wr_dropped > 0,    "write while full happened");
    check(n_rx_overrun > 0,    "rx FIFO overrun happened");
    check(n_back_to_back > 0,  "back-to-back frames happened");
    check(n_parity_err > 0,    "parity error happened");
    check(n_glitch > 0,        "glitch rejection happened");
    check(n_full_duplex > 0,   "full duplex happened");
    check(n_rx_empty_read > 0, "read while empty happened");
    $display("mechanisms: tx_full=%0d wr_dropped=%0d overrun=%0d back_to_back=%0d parity_err=%0d glitch=%0d duplex=%0d empty_read=%0d",
             n_tx_full, n_wr_dropped, n_rx_overrun, n_back_to_back, n_parity_err, n_glitch,
             n_full_duplex, n_rx_empty_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50 * FRAME) @(posedge sys_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
