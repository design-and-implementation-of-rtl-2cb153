// tb_uart_tx: self-checking test of the data sending unit.
//
// Sends random bytes with a short bit period (CPB clocks per bit), some back
// to back, some with idle gaps. After each accepted start the line is
// compared in every clock cycle with an 8N1 frame built by the testbench:
// start bit 0, data bits from bit 0 upward, stop bit 1, each exactly CPB
// cycles long, beginning one cycle after the start was sampled. It also
// checks busy for the whole frame, a single done pulse in the frame's last
// cycle, that `data` may change after the start without harm, and that a
// start pulse during a frame is ignored.
module tb_uart_tx;

  localparam int unsigned CPB  = 8;
  localparam int unsigned BITS = 8;
  localparam int unsigned FRAME = (BITS + 2) * CPB;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            start = 1'b0;
  logic [BITS-1:0] data = '0;
  logic            line, busy, done;
  int checks = 0, failures = 0;
  int ignored_starts = 0;

  always #5 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB), .DATA_BITS(BITS)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .data(data),
    .rs232_tx(line), .busy(busy), .done(done));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  // Expected level of frame bit k for byte b.
  function automatic logic frame_bit(logic [BITS-1:0] b, int k);
    if (k == 0)         return 1'b0;
    else if (k <= BITS) return b[k-1];
    else                return 1'b1;
  endfunction

  // Called at a negative edge; returns at the negative edge after the frame.
  task automatic send_and_check(logic [BITS-1:0] b, bit poke_while_busy);
    start = 1'b1;
    data  = b;
    @(negedge clk);                 // start sampled at the edge just passed
    check(busy === 1'b1, "busy after start");
    start = 1'b0;
    data  = ~b;                     // the latched copy must be used
    for (int i = 1; i <= FRAME; i++) begin
      @(negedge clk);
      check(line === frame_bit(b, (i - 1) / CPB), $sformatf("line bit %0d of %02h", (i - 1) / CPB, b));
      check(done === (i == FRAME), "done pulse position");
      check(busy === (i < FRAME), "busy during frame");
      if (poke_while_busy && i == 2 * CPB) begin
        start = 1'b1;
        data  = 8'h00;
        ignored_starts++;
      end else begin
        start = 1'b0;
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(line === 1'b1 && !busy && !done, "idle after reset");
    for (int n = 0; n < 40; n++) begin
      int gap;
      send_and_check(BITS'($urandom), (n % 3) == 1);
      gap = (n % 4 == 0) ? 0 : $urandom_range(1, 2 * CPB);
      repeat (gap) begin
        @(negedge clk);
        check(line === 1'b1 && !done && !busy, "line idle between frames");
      end
    end
    send_and_check(8'h00, 1'b0);
    send_and_check(8'hFF, 1'b0);
    send_and_check(8'hA5, 1'b0);
    check(ignored_starts > 0, "start during a frame was tried");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100 * FRAME) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
