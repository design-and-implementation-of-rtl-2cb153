// tb_uart_tx_monitor: self-checking test of the transmit monitoring unit.
//
// The FIFO is modelled by a queue with show-ahead output; the transmitter by
// a model that, when started while idle, stays busy for a random number of
// cycles and ends with a one-cycle done as busy falls. Bytes are pushed at
// random moments. Checks: every byte reaches tx_data in FIFO order, each
// removal is followed by exactly one tx_start in the next cycle, no read
// from an empty FIFO, no start while busy, the next byte is taken one cycle
// after done when one is waiting, and tx_idle exactly when the FIFO is empty
// and no byte is between its removal and the cycle after its done.
module tb_uart_tx_monitor;

  localparam int unsigned BITS = 8;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            fifo_empty, fifo_rd_en;
  logic [BITS-1:0] fifo_rd_data;
  logic            tx_start, tx_busy = 1'b0, tx_done = 1'b0;
  logic [BITS-1:0] tx_data;
  logic            tx_idle;
  logic [BITS-1:0] fifo[$];
  logic [BITS-1:0] expected[$];
  int checks = 0, failures = 0;
  int busy_left = 0, launched = 0, pushed = 0;
  bit rd_last = 1'b0, done_last = 1'b0;
  bit inflight = 1'b0;   // a byte left the FIFO and its done has not been seen

  always #5 clk = ~clk;

  assign fifo_empty   = (fifo.size() == 0);
  assign fifo_rd_data = fifo_empty ? '0 : fifo[0];

  uart_tx_monitor #(.DATA_BITS(BITS)) dut (
    .clk(clk), .rst_n(rst_n), .fifo_empty(fifo_empty), .fifo_rd_data(fifo_rd_data),
    .fifo_rd_en(fifo_rd_en), .tx_start(tx_start), .tx_data(tx_data),
    .tx_busy(tx_busy), .tx_done(tx_done), .tx_idle(tx_idle));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  // Checks on settled signals, then the models advance at the clock edge.
  always @(negedge clk) begin
    if (rst_n) begin
      check(!(fifo_rd_en && fifo_empty), "no read from an empty FIFO");
      check(tx_start == rd_last, "tx_start one cycle after the FIFO read");
      check(!(tx_start && tx_busy), "no start while busy");
      if (done_last && !fifo_empty) check(fifo_rd_en, "next byte taken right after done");
      check(tx_idle == (fifo_empty && !inflight), "tx_idle");
      if (tx_start) begin
        check(expected.size() > 0 && tx_data === expected[0], "byte order");
        if (expected.size() > 0) void'(expected.pop_front());
      end
    end
  end

  always @(posedge clk) begin
    rd_last   <= fifo_rd_en;
    done_last <= tx_done;
    if (fifo_rd_en)   inflight <= 1'b1;
    else if (tx_done) inflight <= 1'b0;
    if (fifo_rd_en && fifo.size() > 0) expected.push_back(fifo.pop_front());
    // transmitter model
    tx_done <= 1'b0;
    if (tx_start && !tx_busy) begin
      tx_busy   <= 1'b1;
      busy_left <= $urandom_range(1, 20);
      launched++;
    end else if (tx_busy) begin
      if (busy_left == 1) begin
        tx_busy <= 1'b0;
        tx_done <= 1'b1;
      end
      busy_left <= busy_left - 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      #1;
      if ($urandom_range(0, 99) < ((cyc / 500) % 2 == 0 ? 12 : 3)) begin
        fifo.push_back(BITS'($urandom));
        pushed++;
      end
    end
    repeat (400) @(negedge clk);
    check(launched == pushed && fifo.size() == 0, "every byte launched");
    check(tx_idle, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
