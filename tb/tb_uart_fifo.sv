// tb_uart_fifo: self-checking testbench for uart_fifo.
//
// The default FIFO (8 words of 8 bits) and a 2-word, 9-bit one are driven
// with random push and pop requests, biased in phases towards filling and
// towards draining. A queue in the testbench models the expected contents;
// each cycle the testbench checks `empty`, `full` and the head word on
// `rdata` against the model. Pushes while full (which must be dropped
// unless a pop happens in the same cycle) and pops while empty (ignored)
// are counted, and each must have happened at least once.
module tb_uart_fifo;

  logic clk, reset;
  int   checks = 0, failures = 0;

  initial begin
    clk   = 1'b0;
    reset = 1'b1;
    forever #5 clk = ~clk;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // instance A: defaults
  logic       wr_a, rd_a, full_a, empty_a;
  logic [7:0] wd_a, rdat_a;
  uart_fifo dut_a (.clk, .reset, .wr(wr_a), .wdata(wd_a), .rd(rd_a),
                   .rdata(rdat_a), .full(full_a), .empty(empty_a));

  // instance B: 2 x 9 bits
  logic       wr_b, rd_b, full_b, empty_b;
  logic [8:0] wd_b, rdat_b;
  uart_fifo #(.DATA_W(9), .DEPTH(2)) dut_b (.clk, .reset, .wr(wr_b), .wdata(wd_b), .rd(rd_b),
                                            .rdata(rdat_b), .full(full_b), .empty(empty_b));

  logic [7:0] model_a[$];
  logic [8:0] model_b[$];
  int         wr_full_a = 0, rd_empty_a = 0, wr_rd_full_a = 0, peak_a = 0;
  int         wr_full_b = 0, rd_empty_b = 0;

  initial begin
    int wbias, rbias;
    wr_a = 0; rd_a = 0; wd_a = '0;
    wr_b = 0; rd_b = 0; wd_b = '0;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // phases of 200 cycles: filling, draining, balanced
      case ((cyc / 200) % 3)
        0: begin wbias = 80; rbias = 20; end
        1: begin wbias = 20; rbias = 80; end
        default: begin wbias = 50; rbias = 50; end
      endcase
      @(negedge clk);
      // compare outputs with the model
      check(empty_a == (model_a.size() == 0), $sformatf("A empty, model %0d", model_a.size()));
      check(full_a  == (model_a.size() == 8), $sformatf("A full, model %0d", model_a.size()));
      if (model_a.size() > 0) check(rdat_a == model_a[0], $sformatf("A head %02h vs %02h", rdat_a, model_a[0]));
      check(empty_b == (model_b.size() == 0), "B empty");
      check(full_b  == (model_b.size() == 2), "B full");
      if (model_b.size() > 0) check(rdat_b == model_b[0], "B head");
      // new requests
      wr_a = ($urandom_range(99) < wbias);
      rd_a = ($urandom_range(99) < rbias);
      wd_a = 8'($urandom);
      wr_b = ($urandom_range(99) < wbias);
      rd_b = ($urandom_range(99) < rbias);
      wd_b = 9'($urandom);
      // update the models as the FIFO must at the next edge
      begin
        bit pop_a, push_a, pop_b, push_b;
        pop_a  = rd_a && model_a.size() > 0;
        push_a = wr_a && (model_a.size() < 8 || pop_a);
        if (wr_a && model_a.size() == 8) begin
          if (pop_a) wr_rd_full_a++; else wr_full_a++;
        end
        if (rd_a && model_a.size() == 0) rd_empty_a++;
        if (pop_a) void'(model_a.pop_front());
        if (push_a) model_a.push_back(wd_a);
        pop_b  = rd_b && model_b.size() > 0;
        push_b = wr_b && (model_b.size() < 2 || pop_b);
        if (wr_b && model_b.size() == 2 && !pop_b) wr_full_b++;
        if (rd_b && model_b.size() == 0) rd_empty_b++;
        if (pop_b) void'(model_b.pop_front());
        if (push_b) model_b.push_back(wd_b);
      end
      if (model_a.size() > peak_a) peak_a = model_a.size();
    end
    check(wr_full_a > 0,    "A: push while full happened");
    check(wr_rd_full_a > 0, "A: push and pop while full happened");
    check(rd_empty_a > 0,   "A: pop while empty happened");
    check(wr_full_b > 0 && rd_empty_b > 0, "B: full and empty cases happened");
    check(peak_a == 8, "A: holds 8 words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
