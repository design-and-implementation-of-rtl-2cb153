// tb_uart_rs232_full: the UART at its default parameters (50 MHz clock,
// 9600 baud, 5208 clocks per bit), rs232_tx looped back to rs232_rx.
//
// Sends the byte 8'h4A, whose frame reads 0,0,1,0,1,0,0,1,0,1 on the line
// (start bit, bits 0..7, stop bit), then three more bytes queued together.
// Checks: the line level in the middle of every bit of the first frame, the
// bit period (the line stays low for start bit plus bit 0, 2 * 5208
// cycles), the frame-to-frame spacing of queued bytes (10 bit periods plus
// the few cycles the monitoring unit takes between frames), and every byte
// received back with the receiver's latency of 3 + 9.5 * 5208 cycles after
// the start edge.
module tb_uart_rs232_full;

  localparam int unsigned CPB  = 50_000_000 / 9_600;   // 5208
  localparam int unsigned BITS = 8;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            tx_wr_en = 1'b0;
  logic [BITS-1:0] tx_wr_data = '0;
  logic            tx_full, tx_idle;
  logic [4:0]      tx_fifo_count;
  logic [BITS-1:0] rx_data;
  logic            rx_done, rx_frame_error, rx_busy;
  logic            line;
  int          cycle = 0;
  int          starts[$];
  logic [BITS-1:0] sent[$];
  int checks = 0, failures = 0;
  int received = 0;

  always #10 clk = ~clk;   // 50 MHz
  always @(negedge clk) cycle <= cycle + 1;

  uart_rs232_top dut (
    .clk(clk), .rst_n(rst_n),
    .tx_wr_en(tx_wr_en), .tx_wr_data(tx_wr_data), .tx_full(tx_full), .tx_idle(tx_idle),
    .tx_fifo_count(tx_fifo_count),
    .rx_data(rx_data), .rx_done(rx_done), .rx_frame_error(rx_frame_error), .rx_busy(rx_busy),
    .rs232_tx(line), .rs232_rx(line));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  task automatic write_byte(logic [BITS-1:0] b);
    tx_wr_en   = 1'b1;
    tx_wr_data = b;
    sent.push_back(b);
    @(negedge clk);
    tx_wr_en = 1'b0;
  endtask

  // Record the cycle of every start edge on the line (a falling edge at
  // least nine bit periods after the previous start; edges inside a frame
  // come earlier).
  logic line_q = 1'b1;
  always @(negedge clk) begin
    line_q <= line;
    if (rst_n && line_q && !line &&
        (starts.size() == 0 || cycle - starts[$] >= (BITS + 1) * CPB))
      starts.push_back(cycle);
  end

  // Every received byte, with its latency from its start edge.
  always @(negedge clk) begin
    if (rst_n && rx_done) begin
      check(sent.size() > 0 && rx_data === sent[0], $sformatf("received %02h", rx_data));
      check(!rx_frame_error, "no frame error");
      check(starts.size() > received &&
            cycle - starts[received] == 3 + (2 * BITS + 3) * CPB / 2,
            "receive latency");
      if (sent.size() > 0) void'(sent.pop_front());
      received++;
    end
  end

  initial begin
    logic [BITS+1:0] frame;
    int fall, rise;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    write_byte(8'h4A);
    wait (line == 1'b0);
    fall = cycle;
    wait (line == 1'b1);
    rise = cycle;
    check(rise - fall == 2 * CPB, $sformatf("start plus bit 0 last %0d cycles", rise - fall));
    // Mid-bit levels of the rest of the first frame (the start bit and
    // bit 0 are the low stretch just measured).
    frame = {1'b1, 8'h4A, 1'b0};
    for (int k = 2; k < BITS + 2; k++) begin
      while (cycle < fall + k * CPB + CPB / 2) @(negedge clk);
      check(line === frame[k], $sformatf("frame bit %0d", k));
    end
    // Three bytes queued together go out back to back.
    wait (tx_idle && !rx_busy);
    @(negedge clk);
    write_byte(8'h00);
    write_byte(8'hFF);
    write_byte(8'h55);
    wait (received == 4);
    repeat (CPB) @(negedge clk);
    check(tx_idle && sent.size() == 0, "all bytes sent and received");
    check(starts.size() == 4, "four frames on the line");
    if (starts.size() == 4)
      for (int i = 2; i < 4; i++)
        check(starts[i] - starts[i-1] >= (BITS + 2) * CPB &&
              starts[i] - starts[i-1] <= (BITS + 2) * CPB + 4,
              $sformatf("frame spacing %0d", starts[i] - starts[i-1]));
    $display("frames %0d, bit period %0d cycles", received, (rise - fall) / 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6 * (BITS + 2) * CPB) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
