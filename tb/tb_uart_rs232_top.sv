// tb_uart_rs232_top: end-to-end test of the UART, reduced bit period.
//
// The top runs with a 1.6 MHz clock and 100 kbaud (16 clocks per bit) so the
// test stays short; the structure is the same as at the defaults. A line
// decoder in the testbench checks every frame on rs232_tx against the bytes
// written; a monitor checks every rx_done against the bytes expected at the
// receiver. rs232_rx is either looped back from rs232_tx or driven by a
// serial driver in the testbench. Phases:
//   1. single bytes in loopback, each sent from an idle UART;
//   2. a burst of writes that fills the FIFO: writes while full are dropped,
//      the queued bytes go out as back-to-back frames and loop back;
//   3. full duplex: the UART sends while the driver sends it other frames,
//      one with a stop bit of 0 (frame error), plus a short glitch that must
//      not be taken for a start bit.
// Each of these mechanisms is counted and must happen at least once.
module tb_uart_rs232_top;

  localparam int unsigned CLK_HZ = 1_600_000;
  localparam int unsigned BAUD   = 100_000;
  localparam int unsigned CPB    = CLK_HZ / BAUD;
  localparam int unsigned BITS   = 8;
  localparam int unsigned DEPTH  = 16;

  typedef struct {
    logic [BITS-1:0] data;
    logic            bad_stop;
  } rx_item_t;

  logic                   clk = 1'b0;
  logic                   rst_n = 1'b0;
  logic                   tx_wr_en = 1'b0;
  logic [BITS-1:0]        tx_wr_data = '0;
  logic                   tx_full, tx_idle;
  logic [$clog2(DEPTH):0] tx_fifo_count;
  logic [BITS-1:0]        rx_data;
  logic                   rx_done, rx_frame_error, rx_busy;
  logic                   rs232_tx, rs232_rx;
  logic                   loopback = 1'b1;
  logic                   drv_line = 1'b1;

  logic [BITS-1:0] tx_expect[$];
  rx_item_t        rx_expect[$];
  int cycle = 0;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_tx_frames = 0, n_rx_frames = 0, n_single = 0, n_full = 0, n_dropped = 0;
  int n_back_to_back = 0, n_frame_err = 0, n_glitch = 0, n_duplex = 0;

  always #5 clk = ~clk;
  always @(negedge clk) cycle <= cycle + 1;

  assign rs232_rx = loopback ? rs232_tx : drv_line;

  uart_rs232_top #(
    .CLK_FREQ_HZ (CLK_HZ),
    .BAUD_RATE   (BAUD),
    .DATA_BITS   (BITS),
    .FIFO_DEPTH  (DEPTH)
  ) dut (
    .clk(clk), .rst_n(rst_n),
    .tx_wr_en(tx_wr_en), .tx_wr_data(tx_wr_data), .tx_full(tx_full), .tx_idle(tx_idle),
    .tx_fifo_count(tx_fifo_count),
    .rx_data(rx_data), .rx_done(rx_done), .rx_frame_error(rx_frame_error), .rx_busy(rx_busy),
    .rs232_tx(rs232_tx), .rs232_rx(rs232_rx));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  // One write, at a falling edge; dropped by the FIFO when it is full.
  task automatic write_byte(logic [BITS-1:0] b);
    tx_wr_en   = 1'b1;
    tx_wr_data = b;
    if (tx_full) begin
      n_dropped++;
    end else begin
      tx_expect.push_back(b);
      if (loopback) rx_expect.push_back('{data: b, bad_stop: 1'b0});
    end
    @(negedge clk);
    tx_wr_en = 1'b0;
  endtask

  task automatic wait_idle();
    do @(negedge clk); while (!(tx_idle && !rx_busy && rs232_tx));
    repeat (2 * CPB) @(negedge clk);
  endtask

  // Serial driver for rs232_rx when not looped back.
  task automatic drive_frame(logic [BITS-1:0] b, bit bad_stop);
    rx_expect.push_back('{data: b, bad_stop: bad_stop});
    for (int k = 0; k < BITS + 2; k++) begin
      drv_line = (k == 0) ? 1'b0 : (k <= BITS) ? b[k-1] : !bad_stop;
      repeat (CPB) @(negedge clk);
    end
    drv_line = 1'b1;
  endtask

  // Decoder of rs232_tx: samples each bit in its middle.
  initial begin
    static int last_start = -1;
    forever begin
      @(negedge clk);
      if (rst_n && rs232_tx == 1'b0) begin
        logic [BITS-1:0] b;
        if (last_start >= 0 && cycle - last_start <= (BITS + 2) * CPB + 4) n_back_to_back++;
        last_start = cycle;
        repeat (CPB / 2) @(negedge clk);
        check(rs232_tx == 1'b0, "start bit on rs232_tx");
        for (int k = 0; k < BITS; k++) begin
          repeat (CPB) @(negedge clk);
          b[k] = rs232_tx;
        end
        repeat (CPB) @(negedge clk);
        check(rs232_tx == 1'b1, "stop bit on rs232_tx");
        n_tx_frames++;
        check(tx_expect.size() > 0, "frame on rs232_tx was written");
        if (tx_expect.size() > 0)
          check(b === tx_expect.pop_front(), $sformatf("byte %02h on rs232_tx", b));
      end
    end
  end

  // Receiver output and duplex monitor.
  always @(negedge clk) begin
    if (rst_n) begin
      if (tx_full) n_full++;
      if (!tx_idle && rx_busy && !loopback) n_duplex++;
      if (rx_done) begin
        n_rx_frames++;
        check(rx_expect.size() > 0, "rx_done expected");
        if (rx_expect.size() > 0) begin
          rx_item_t e;
          e = rx_expect.pop_front();
          check(rx_data === e.data, $sformatf("rx_data %02h expected %02h", rx_data, e.data));
          check(rx_frame_error === e.bad_stop, "rx_frame_error");
          if (rx_frame_error) n_frame_err++;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(tx_idle && rs232_tx && !rx_busy, "idle after reset");

    // 1. single frames in loopback
    for (int n = 0; n < 4; n++) begin
      write_byte(BITS'($urandom));
      n_single++;
      wait_idle();
    end

    // 2. burst that overfills the FIFO
    for (int n = 0; n < DEPTH + 8; n++) write_byte(BITS'($urandom));
    wait_idle();

    // 3. full duplex with independent receive traffic
    loopback = 1'b0;
    fork
      begin
        for (int n = 0; n < 4; n++) write_byte(BITS'($urandom));
      end
      begin
        repeat (3 * CPB) @(negedge clk);
        drive_frame(8'h4A, 1'b0);
        drive_frame(BITS'($urandom), 1'b1);
        repeat (2 * CPB) @(negedge clk);
        // glitch: low for less than half a bit
        begin
          int n_before;
          n_before = n_rx_frames;
          drv_line = 1'b0;
          repeat (CPB / 4) @(negedge clk);
          drv_line = 1'b1;
          repeat (12 * CPB) @(negedge clk);
          check(n_rx_frames == n_before, "glitch gave no frame");
          if (n_rx_frames == n_before) n_glitch++;
        end
        drive_frame(BITS'($urandom), 1'b0);
      end
    join
    wait_idle();
    loopback = 1'b1;

    check(tx_expect.size() == 0 && rx_expect.size() == 0, "all frames accounted for");
    check(n_single > 0,       "mechanism: single frame");
    check(n_full > 0,         "mechanism: FIFO full");
    check(n_dropped > 0,      "mechanism: write dropped while full");
    check(n_back_to_back > 0, "mechanism: back-to-back frames");
    check(n_frame_err > 0,    "mechanism: frame error");
    check(n_glitch > 0,       "mechanism: glitch rejected");
    check(n_duplex > 0,       "mechanism: full duplex");
    $display("tx frames %0d, rx frames %0d, single %0d, FIFO-full cycles %0d, dropped %0d",
             n_tx_frames, n_rx_frames, n_single, n_full, n_dropped);
    $display("back-to-back %0d, frame errors %0d, glitches %0d, duplex cycles %0d",
             n_back_to_back, n_frame_err, n_glitch, n_duplex);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100 * (BITS + 2) * CPB) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
