// tb_uart_tx: self-checking testbench for uart_tx.
//
// Two transmitters share a tick `en` made here (one pulse every 3 clocks):
// dut_a in the default format (8 data bits, even parity, 1 stop bit) and
// dut_b in a 7-bit, odd-parity, 2-stop-bit format. Each line is decoded by
// the independent monitor tb_uart_serial_mon; every decoded word, parity
// bit, start bit and stop bit is compared with what was sent. The frame
// length is checked in ticks: busy must last exactly
// (1 + DATA_BITS + 1 + STOP_BITS) * 16 ticks and tx_done must pulse once
// per frame. Words are sent both one by one and back to back (tx_start
// held high, din changed on tx_done), and the line must stay high when
// idle.
module tb_uart_tx;
  import uart_pkg::*;

  localparam int unsigned OS = 16;

  logic       clk, reset, en;
  int         div_cnt;
  int         checks = 0, failures = 0;

  // dut_a: 8E1
  logic       start_a, tx_a, done_a, busy_a;
  logic [7:0] din_a;
  // dut_b: 7O2
  logic       start_b, tx_b, done_b, busy_b;
  logic [6:0] din_b;

  logic       mv_a, mp_a, ms_a, mst_a, mv_b, mp_b, ms_b, mst_b;
  logic [7:0] md_a, md_b;

  initial begin
    clk   = 1'b0;
    reset = 1'b1;
    forever #5 clk = ~clk;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      div_cnt <= 0;
      en      <= 1'b0;
    end else begin
      div_cnt <= (div_cnt == 2) ? 0 : div_cnt + 1;
      en      <= (div_cnt == 2);
    end
  end

  uart_tx dut_a (.clk, .reset, .en, .tx_start(start_a), .din(din_a),
                 .tx(tx_a), .tx_done(done_a), .busy(busy_a));
  uart_tx #(.DATA_BITS(7), .PARITY(PARITY_ODD), .STOP_BITS(2), .OVERSAMPLE(OS))
    dut_b (.clk, .reset, .en, .tx_start(start_b), .din(din_b),
           .tx(tx_b), .tx_done(done_b), .busy(busy_b));

  tb_uart_serial_mon mon_a (.clk, .en, .line(tx_a), .valid(mv_a), .data(md_a),
                            .par_ok(mp_a), .stop_ok(ms_a), .start_ok(mst_a));
  tb_uart_serial_mon #(.DATA_BITS(7), .PARITY(PARITY_ODD), .STOP_BITS(2), .OVERSAMPLE(OS))
    mon_b (.clk, .en, .line(tx_b), .valid(mv_b), .data(md_b),
           .par_ok(mp_b), .stop_ok(ms_b), .start_ok(mst_b));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // expected words, in order
  logic [7:0] exp_a[$], exp_b[$];
  int         frames_a, frames_b, done_cnt_a, done_cnt_b;
  int         busy_ticks_a, busy_ticks_b;

  initial forever @(posedge clk) begin
    if (mv_a) begin
      frames_a++;
      check(exp_a.size() > 0, "A: unexpected frame");
      if (exp_a.size() > 0) begin
        logic [7:0] e;
        e = exp_a.pop_front();
        check(md_a == e, $sformatf("A: got %02h expected %02h", md_a, e));
      end
      check(mp_a && ms_a && mst_a, "A: parity/stop/start bits");
    end
    if (mv_b) begin
      frames_b++;
      check(exp_b.size() > 0, "B: unexpected frame");
      if (exp_b.size() > 0) begin
        logic [7:0] e;
        e = exp_b.pop_front();
        check(md_b[6:0] == e[6:0], $sformatf("B: got %02h expected %02h", md_b, e));
      end
      check(mp_b && ms_b && mst_b, $sformatf("B: parity/stop/start bits %b%b%b frame %0d data %02h", mp_b, ms_b, mst_b, frames_b, md_b));
    end
    // frame length in ticks, counted while busy
    if (!reset) begin
      if (busy_a && en) busy_ticks_a++;
      if (busy_b && en) busy_ticks_b++;
      if (done_a) begin
        done_cnt_a++;
        check(busy_ticks_a == (1 + 8 + 1 + 1) * OS,
              $sformatf("A: frame lasted %0d ticks", busy_ticks_a));
        busy_ticks_a = 0;
      end
      if (done_b) begin
        done_cnt_b++;
        check(busy_ticks_b == (1 + 7 + 1 + 2) * OS,
              $sformatf("B: frame lasted %0d ticks", busy_ticks_b));
        busy_ticks_b = 0;
      end
      if (!busy_a && !start_a) check(tx_a == 1'b1, "A: line idle high");
    end
  end

  task automatic send_a(logic [7:0] w);
    @(posedge clk iff !busy_a);
    start_a <= 1'b1;
    din_a   <= w;
    exp_a.push_back(w);
    @(posedge clk);
    start_a <= 1'b0;
    din_a   <= ~w;          // din must only matter in the accepting cycle
    @(posedge clk);
    check(busy_a, "A: busy after start");
  endtask

  initial begin
    logic [7:0] words[6];
    words = '{8'h00, 8'hFF, 8'h55, 8'hA5, 8'h01, 8'h80};
    frames_a = 0; frames_b = 0; done_cnt_a = 0; done_cnt_b = 0;
    busy_ticks_a = 0; busy_ticks_b = 0;
    start_a = 1'b0; din_a = '0;
    start_b = 1'b0; din_b = '0;
    repeat (4) @(posedge clk);
    reset <= 1'b0;
    repeat (10) @(posedge clk);
    check(tx_a && tx_b && !busy_a && !busy_b, "idle after reset");
    // one by one, with idle gaps
    foreach (words[i]) begin
      send_a(words[i]);
      repeat (50) @(posedge clk);
    end
    // random words, dut_a one by one
    repeat (10) send_a(8'($urandom));
    // dut_b back to back: tx_start held high, din advanced on tx_done
    for (int i = 0; i < 12; i++) exp_b.push_back(8'($urandom) & 8'h7F);
    begin
      logic [7:0] src[$];
      src = exp_b;
      din_b   <= src[0][6:0];
      start_b <= 1'b1;
      while (src.size() > 0) begin
        @(posedge clk iff done_b);
        void'(src.pop_front());
        if (src.size() > 0) din_b <= src[0][6:0];
        else                start_b <= 1'b0;
      end
    end
    @(posedge clk iff (!busy_a));
    repeat (20 * 3) @(posedge clk);
    check(frames_a == 16 && done_cnt_a == 16, $sformatf("A: %0d frames", frames_a));
    check(frames_b == 12 && done_cnt_b == 12, $sformatf("B: %0d frames", frames_b));
    check(exp_a.size() == 0 && exp_b.size() == 0, "all words seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
