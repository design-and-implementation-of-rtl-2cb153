// uart_baud_gen: baud rate counter that marks one instant in every bit period.
//
// While `en` is high the counter baud_cnt runs from 0 to CLKS_PER_BIT-1 and
// wraps, so one wrap is one bit period on the line. `bit_flag` is high for
// the single clock cycle in which baud_cnt equals FLAG_AT. The transmitter
// uses FLAG_AT = CLKS_PER_BIT-1 (end of a bit: move to the next bit); the
// receiver uses the middle of the bit (sample the line). While `en` is low
// the counter is held at 0, so a period always starts when `en` rises.
//
// The counter and the flag follow the document's description of baud_cnt and
// bit_flag; the choice of the flag position per user and the hold-at-zero
// behaviour are this design's.
//
// Timing: bit_flag is a comparator on the counter register, valid in the
// cycle the counter holds FLAG_AT; the first flag comes FLAG_AT+1 cycles
// after en rises, then every CLKS_PER_BIT cycles.
module uart_baud_gen #(
  parameter int unsigned CLKS_PER_BIT = uart_pkg::clks_per_bit(uart_pkg::CLK_FREQ_HZ,
                                                               uart_pkg::BAUD_RATE),
  parameter int unsigned FLAG_AT      = CLKS_PER_BIT - 1
) (
  input  logic clk,
  input  logic rst_n,     // asynchronous, active low
  input  logic en,        // count while high, hold at zero while low
  output logic bit_flag   // one-cycle pulse per bit period
);

  localparam int unsigned CW = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;
  localparam logic [CW-1:0] LAST = CW'(CLKS_PER_BIT - 1);
  localparam logic [CW-1:0] FLAG = CW'(FLAG_AT);

  logic [CW-1:0] baud_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         baud_cnt <= '0;
    else if (!en || baud_cnt == LAST)   baud_cnt <= '0;
    else                                baud_cnt <= baud_cnt + 1'b1;
  end

  assign bit_flag = en && (baud_cnt == FLAG);

  initial begin
    assert (CLKS_PER_BIT >= 2) else $error("CLKS_PER_BIT must be at least 2");
    assert (FLAG_AT < CLKS_PER_BIT) else $error("FLAG_AT must lie inside the bit period");
  end

endmodule
