// tb_uart_baudgen: self-checking testbench for uart_baudgen.
//
// Two instances: one at the default 50 MHz / 19200 baud, one at a small
// 2 MHz / 9600 baud setting. For each, the expected division ratio is
// worked out here with real arithmetic (clock / (baud * 16), rounded) and
// the testbench checks that uarten is a single-cycle pulse and that
// consecutive pulses are exactly that many clocks apart, and that the
// resulting baud rate is within 2 % of the requested one.
module tb_uart_baudgen;

  localparam int unsigned F_A = 50_000_000, B_A = 19_200;
  localparam int unsigned F_B = 2_000_000,  B_B = 9_600;

  logic clk, reset;
  logic tick_a, tick_b;
  int checks = 0, failures = 0;

  initial begin
    clk   = 1'b0;
    reset = 1'b1;
    forever #5 clk = ~clk;
  end

  uart_baudgen                                           dut_a (.clk, .reset, .uarten(tick_a));
  uart_baudgen #(.CLK_FREQ_HZ(F_B), .BAUD_RATE(B_B), .OVERSAMPLE(16)) dut_b (.clk, .reset, .uarten(tick_b));

  function automatic int expected_div(real f, real b);
    return int'($floor(f / (b * 16.0) + 0.5));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic measure(input int which, input int exp_div, input int n, input real f, input real b);
    int  last, cyc, gaps;
    real err;
    bit  prev;
    last = -1; cyc = 0; gaps = 0; prev = 0;
    while (gaps < n) begin
      @(posedge clk);
      cyc++;
      if ((which == 0 ? tick_a : tick_b)) begin
        check(!prev || exp_div == 1, $sformatf("tick %0d is one cycle wide", which));
        if (last >= 0) begin
          check(cyc - last == exp_div,
                $sformatf("gen %0d gap %0d, expected %0d", which, cyc - last, exp_div));
          gaps++;
        end
        last = cyc;
      end
      prev = (which == 0 ? tick_a : tick_b);
    end
    err = (f / (exp_div * 16.0) - b) / b;
    check(err < 0.02 && err > -0.02,
          $sformatf("gen %0d baud error within 2 %%", which));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset = 1'b0;
    measure(0, expected_div(F_A, B_A), 40, F_A, B_A);
    measure(1, expected_div(F_B, B_B), 40, F_B, B_B);
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
