// tb_uart_tx_fifo: self-checking test of the transmit FIFO.
//
// Random writes and reads, with phases biased towards filling and towards
// draining, are mirrored in a queue kept by the testbench. Every cycle the
// head word, full, empty and count are compared with the queue; writes while
// full and reads while empty must change nothing.
module tb_uart_tx_fifo;

  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 16;

  logic                   clk = 1'b0;
  logic                   rst_n = 1'b0;
  logic                   wr_en = 1'b0, rd_en = 1'b0;
  logic [WIDTH-1:0]       wr_data = '0;
  logic [WIDTH-1:0]       rd_data;
  logic                   full, empty;
  logic [$clog2(DEPTH):0] count;
  logic [WIDTH-1:0]       model[$];
  int checks = 0, failures = 0;
  int saw_full = 0, saw_empty_read = 0, saw_full_write = 0;

  always #5 clk = ~clk;

  uart_tx_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_data(wr_data), .full(full),
    .rd_en(rd_en), .rd_data(rd_data), .empty(empty), .count(count));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t model size %0d)", what, $time, model.size());
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int wr_pct;
      wr_pct = ((cyc / 200) % 2 == 0) ? 75 : 25;
      @(negedge clk);
      // Compare the settled outputs with the model.
      check(empty == (model.size() == 0), "empty");
      check(full  == (model.size() == DEPTH), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(rd_data == model[0], "head word");
      if (full) saw_full++;
      wr_en   = ($urandom_range(0, 99) < wr_pct);
      rd_en   = ($urandom_range(0, 99) < 100 - wr_pct);
      wr_data = WIDTH'($urandom);
      @(posedge clk);
      begin
        bit was_full, was_empty;
        was_full  = (model.size() == DEPTH);
        was_empty = (model.size() == 0);
        if (rd_en && !was_empty) void'(model.pop_front());
        else if (rd_en)          saw_empty_read++;
        if (wr_en && !was_full)  model.push_back(wr_data);
        else if (wr_en)          saw_full_write++;
      end
    end
    check(saw_full > 0 && saw_full_write > 0 && saw_empty_read > 0, "full and empty corner cases reached");
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
