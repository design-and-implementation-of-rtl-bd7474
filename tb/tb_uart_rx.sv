// tb_uart_rx: self-checking testbench for uart_rx.
//
// The testbench makes its own oversampling tick `en` (one pulse every 3
// clocks, so one bit is 48 clocks) and drives serial frames onto the line
// by counting clocks, not ticks. dut_a uses the default format (8 data
// bits, even parity); dut_b has 7 data bits and no parity. Checked:
//  - every frame gives exactly one rx_done with the sent word on dout;
//  - parity_err is low for good frames and high when the parity bit is
//    flipped on purpose;
//  - frames whose bit time is 3 % short or long are still received;
//  - a low glitch shorter than half a bit is ignored (no rx_done), and a
//    frame that follows it is received normally;
//  - rx_done arrives in the middle of the stop bit: 10.5 bit times after
//    the start edge for 8E1, 8.5 for 7N1, within a few clocks for the
//    synchronizer and tick phase.
module tb_uart_rx;
  import uart_pkg::*;

  localparam int unsigned OS  = 16;
  localparam int          DIV = 3;
  localparam int          BIT = OS * DIV;

  logic       clk, reset, en;
  int         div_cnt;
  int         checks = 0, failures = 0;
  longint     cyc;

  logic       line_a, done_a, perr_a, busy_a;
  logic [7:0] dout_a;
  logic       line_b, done_b, perr_b, busy_b;
  logic [6:0] dout_b;

  initial begin
    clk   = 1'b0;
    reset = 1'b1;
    forever #5 clk = ~clk;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      cyc     <= 0;
      div_cnt <= 0;
      en      <= 1'b0;
    end else begin
      cyc     <= cyc + 1;
      div_cnt <= (div_cnt == DIV - 1) ? 0 : div_cnt + 1;
      en      <= (div_cnt == DIV - 1);
    end
  end

  uart_rx dut_a (.clk, .reset, .en, .rx(line_a), .dout(dout_a), .rx_done(done_a),
                 .parity_err(perr_a), .busy(busy_a));
  uart_rx #(.DATA_BITS(7), .PARITY(PARITY_NONE), .OVERSAMPLE(OS))
    dut_b (.clk, .reset, .en, .rx(line_b), .dout(dout_b), .rx_done(done_b),
           .parity_err(perr_b), .busy(busy_b));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int     done_cnt_a, done_cnt_b;
  longint t_done_a, t_done_b;
  logic [7:0] got_a;
  logic [6:0] got_b;
  logic       gotp_a;

  initial forever @(posedge clk) begin
    if (done_a) begin
      done_cnt_a += 1;
      t_done_a   = cyc;
      got_a      = dout_a;
      gotp_a     = perr_a;
    end
    if (done_b) begin
      done_cnt_b += 1;
      t_done_b   = cyc;
      got_b      = dout_b;
    end
  end

  // Drive one frame on dut_a's line: bit time `bt` clocks, parity flipped
  // if `bad_par`. Returns the cycle of the start edge.
  task automatic frame_a(input logic [7:0] w, input int bt, input bit bad_par,
                         output longint t0);
    logic p;
    p = ^w;                       // even parity
    if (bad_par) p = ~p;
    @(posedge clk);
    line_a <= 1'b0;
    t0 = cyc;
    repeat (bt) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      line_a <= w[i];
      repeat (bt) @(posedge clk);
    end
    line_a <= p;
    repeat (bt) @(posedge clk);
    line_a <= 1'b1;
    repeat (bt) @(posedge clk);
  endtask

  task automatic frame_b(input logic [6:0] w, output longint t0);
    @(posedge clk);
    line_b <= 1'b0;
    t0 = cyc;
    repeat (BIT) @(posedge clk);
    for (int i = 0; i < 7; i++) begin
      line_b <= w[i];
      repeat (BIT) @(posedge clk);
    end
    line_b <= 1'b1;
    repeat (BIT) @(posedge clk);
  endtask

  task automatic expect_a(logic [7:0] w, bit bad_par, int bt);
    longint t0, lat;
    int     n_prev;
    n_prev = done_cnt_a;
    frame_a(w, bt, bad_par, t0);
    repeat (4) @(posedge clk);
    check(done_cnt_a == n_prev + 1, $sformatf("A: one rx_done for %02h", w));
    check(got_a == w, $sformatf("A: got %02h expected %02h", got_a, w));
    check(gotp_a == bad_par, $sformatf("A: parity_err %b for %02h", gotp_a, w));
    if (bt == BIT) begin
      lat = t_done_a - t0;
      check(lat >= longint'(10.5 * BIT - DIV) && lat <= longint'(10.5 * BIT + 2 * DIV + 3),
            $sformatf("A: rx_done %0d clocks after start edge", lat));
    end
  endtask

  initial begin
    longint t0, lat;
    int     n_prev;
    logic [6:0] wb;
    done_cnt_a = 0;
    done_cnt_b = 0;
    line_a = 1'b1;
    line_b = 1'b1;
    repeat (4) @(posedge clk);
    reset <= 1'b0;
    repeat (100) @(posedge clk);
    check(!busy_a && !busy_b && done_cnt_a == 0, "idle after reset");

    // fixed and random words, nominal rate
    expect_a(8'h00, 0, BIT);
    expect_a(8'hFF, 0, BIT);
    expect_a(8'h5A, 0, BIT);
    expect_a(8'h81, 0, BIT);
    repeat (20) expect_a(8'($urandom), 0, BIT);
    // parity errors
    expect_a(8'h3C, 1, BIT);
    expect_a(8'h01, 1, BIT);
    expect_a(8'hE7, 0, BIT);
    // rate mismatch of -3 % / +3 %
    repeat (5) expect_a(8'($urandom), 0, BIT - 1);
    repeat (5) expect_a(8'($urandom), 0, BIT + 1);

    // glitch shorter than half a bit: ignored
    n_prev = done_cnt_a;
    @(posedge clk);
    line_a <= 1'b0;
    repeat ((OS / 2 - 3) * DIV) @(posedge clk);
    line_a <= 1'b1;
    repeat (3 * BIT) @(posedge clk);
    check(done_cnt_a == n_prev && !busy_a, "A: glitch ignored");
    expect_a(8'hC3, 0, BIT);

    // dut_b: 7 data bits, no parity
    repeat (10) begin
      wb     = 7'($urandom);
      n_prev = done_cnt_b;
      frame_b(wb, t0);
      repeat (4) @(posedge clk);
      check(done_cnt_b == n_prev + 1 && got_b == wb,
            $sformatf("B: got %02h expected %02h", got_b, wb));
      lat = t_done_b - t0;
      check(lat >= longint'(8.5 * BIT - DIV) && lat <= longint'(8.5 * BIT + 2 * DIV + 3),
            $sformatf("B: rx_done %0d clocks after start edge", lat));
    end
    check(!perr_b, "B: no parity error without parity");

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
