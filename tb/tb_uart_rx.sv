// tb_uart_rx: self-checking test of the receiver.
//
// A serial driver in the testbench sends 8N1 frames with a short bit period
// (CPB clocks per bit), changing the line on falling clock edges: random
// bytes with random idle gaps (some frames back to back), frames whose stop
// bit is 0, and short low glitches that are not start bits. Each done is
// compared with the queue of bytes sent: data, frame_error, and the number
// of cycles from the start-bit edge, which must be 3 + (8 + 1.5) * CPB
// (two synchroniser stages and the edge detector, then mid-bit sampling).
// A glitch must not produce any done.
module tb_uart_rx;

  localparam int unsigned CPB  = 16;
  localparam int unsigned BITS = 8;
  localparam int unsigned LATENCY = 3 + (2 * BITS + 3) * CPB / 2;

  typedef struct {
    logic [BITS-1:0] data;
    logic            bad_stop;
    int          fall_cycle;
  } frame_t;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            line = 1'b1;
  logic [BITS-1:0] rx_data;
  logic            done, frame_error, busy;
  frame_t          sent[$];
  int          cycle = 0;
  int checks = 0, failures = 0;
  int received = 0, frame_errors = 0, glitches = 0;

  always #5 clk = ~clk;
  always @(negedge clk) cycle <= cycle + 1;

  uart_rx #(.CLKS_PER_BIT(CPB), .DATA_BITS(BITS)) dut (
    .clk(clk), .rst_n(rst_n), .rs232_rx(line), .rx_data(rx_data),
    .done(done), .frame_error(frame_error), .busy(busy));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  // Drive one frame, starting at a falling clock edge.
  task automatic send(logic [BITS-1:0] b, bit bad_stop);
    frame_t f;
    f.data = b;
    f.bad_stop = bad_stop;
    f.fall_cycle = cycle;
    sent.push_back(f);
    for (int k = 0; k < BITS + 2; k++) begin
      if (k == 0)         line = 1'b0;
      else if (k <= BITS) line = b[k-1];
      else                line = !bad_stop;
      repeat (CPB) @(negedge clk);
    end
    line = 1'b1;
  endtask

  // Check every done against the oldest frame sent.
  always @(negedge clk) begin
    if (rst_n && done) begin
      received++;
      if (sent.size() == 0) begin
        check(1'b0, "done without a frame");
      end else begin
        frame_t f;
        f = sent.pop_front();
        check(rx_data === f.data, $sformatf("data %02h expected %02h", rx_data, f.data));
        check(frame_error === f.bad_stop, "frame_error");
        check(cycle - f.fall_cycle == LATENCY,
              $sformatf("latency %0d expected %0d", cycle - f.fall_cycle, LATENCY));
        if (frame_error) frame_errors++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2 * CPB) @(negedge clk);
    for (int n = 0; n < 40; n++) begin
      send(BITS'($urandom), 1'b0);
      repeat ((n % 3 == 0) ? 0 : $urandom_range(1, 2 * CPB)) @(negedge clk);
    end
    send(8'h00, 1'b0);
    send(8'hFF, 1'b0);
    // Stop bits read as 0.
    for (int n = 0; n < 4; n++) begin
      send(BITS'($urandom), 1'b1);
      repeat (2 * CPB) @(negedge clk);
    end
    // Glitches shorter than half a bit: no frame may come out.
    for (int n = 0; n < 6; n++) begin
      int n_before;
      n_before = received;
      line = 1'b0;
      repeat (1 + $urandom_range(0, CPB / 2 - 4)) @(negedge clk);
      line = 1'b1;
      glitches++;
      repeat (12 * CPB) @(negedge clk);
      check(received == n_before && !busy, "glitch rejected");
    end
    send(8'h5A, 1'b0);
    repeat (2 * CPB) @(negedge clk);
    check(sent.size() == 0, "every frame received");
    check(received == 40 + 2 + 4 + 1, "number of frames");
    check(frame_errors == 4, "number of frame errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * 10 * CPB) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
