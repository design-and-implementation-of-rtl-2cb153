// tb_uart_baud_gen: self-checking test of the baud rate counter.
//
// Runs the counter with a short bit period, enabling it for bursts of
// different lengths. A cycle count kept by the testbench since `en` rose
// predicts bit_flag: high exactly when (cycles - FLAG_AT) is a multiple of
// CLKS_PER_BIT, and never while `en` is low. Two instances check an
// end-of-bit and a mid-bit flag position.
module tb_uart_baud_gen;

  localparam int unsigned CPB = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic flag_end, flag_mid;
  int   checks = 0, failures = 0;
  int   since_en;
  int   flags_end = 0, flags_mid = 0;

  always #5 clk = ~clk;

  uart_baud_gen #(.CLKS_PER_BIT(CPB), .FLAG_AT(CPB - 1)) dut_end (
    .clk(clk), .rst_n(rst_n), .en(en), .bit_flag(flag_end));
  uart_baud_gen #(.CLKS_PER_BIT(CPB), .FLAG_AT(CPB / 2 - 1)) dut_mid (
    .clk(clk), .rst_n(rst_n), .en(en), .bit_flag(flag_mid));

  // since_en counts the cycles en has been high, 0 in its first cycle.
  always @(posedge clk) begin
    if (!rst_n || !en) since_en <= 0;
    else               since_en <= since_en + 1;
  end

  // Compare in the middle of each cycle, when all signals are settled.
  always @(negedge clk) begin
    if (rst_n) begin
      bit exp_end, exp_mid;
      exp_end = en && ((since_en % CPB) == CPB - 1);
      exp_mid = en && ((since_en % CPB) == CPB / 2 - 1);
      checks += 2;
      if (flag_end !== exp_end) begin
        failures++;
        $display("FAIL end flag: since_en=%0d flag=%0b expected=%0b", since_en, flag_end, exp_end);
      end
      if (flag_mid !== exp_mid) begin
        failures++;
        $display("FAIL mid flag: since_en=%0d flag=%0b expected=%0b", since_en, flag_mid, exp_mid);
      end
      if (flag_end) flags_end++;
      if (flag_mid) flags_mid++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int burst = 0; burst < 20; burst++) begin
      int on_len, off_len;
      on_len  = 1 + $urandom_range(0, 5 * CPB);
      off_len = 1 + $urandom_range(0, 2 * CPB);
      @(posedge clk) en <= 1'b1;
      repeat (on_len) @(posedge clk);
      en <= 1'b0;
      repeat (off_len) @(posedge clk);
    end
    // A long burst must give one flag per bit period.
    flags_end = 0;
    @(posedge clk) en <= 1'b1;
    repeat (10 * CPB) @(posedge clk);
    en <= 1'b0;
    @(posedge clk);
    checks++;
    if (flags_end != 10) begin
      failures++;
      $display("FAIL: %0d end flags in 10 bit periods", flags_end);
    end
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
