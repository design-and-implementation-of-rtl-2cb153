// uart_tx: data sending logic unit, parallel byte in, one serial 8N1 frame out.
//
// When `start` is high while the unit is idle, the byte on `data` is copied
// into r_data (so a later change of `data` cannot mix two bytes into one
// frame) and `state` goes high. A baud counter then pulses bit_flag at the
// end of every bit period and bit_cnt advances on each pulse: bit_cnt = 0
// sends the start bit (low), 1..DATA_BITS send r_data from bit 0 upward, and
// DATA_BITS+1 sends the stop bit (high). When bit_flag ends the stop bit,
// `state` drops and `done` pulses for one cycle. The line is high while idle.
// This sequence follows the document; no parity bit is sent, as there.
//
// Interface: start/data are sampled only while busy is low; busy is the
// working state. Timing, a choice of this design: rs232_tx is a register
// fed from state, bit_cnt and r_data, so the line trails those by one clock.
// Each bit lasts exactly CLKS_PER_BIT cycles and a whole frame
// (DATA_BITS+2)*CLKS_PER_BIT; done comes in the last cycle of the stop bit.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = uart_pkg::clks_per_bit(uart_pkg::CLK_FREQ_HZ,
                                                               uart_pkg::BAUD_RATE),
  parameter int unsigned DATA_BITS    = uart_pkg::DATA_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,     // asynchronous, active low
  input  logic                 start,     // request to send `data`
  input  logic [DATA_BITS-1:0] data,      // parallel byte to send
  output logic                 rs232_tx,  // serial line, logic level
  output logic                 busy,      // working state
  output logic                 done       // one-cycle pulse at the end of the frame
);

  import uart_pkg::*;

  localparam int unsigned BW = $clog2(DATA_BITS + 2);
  localparam logic [BW-1:0] STOP_CNT = BW'(DATA_BITS + 1);
  localparam int unsigned IW = (DATA_BITS > 1) ? $clog2(DATA_BITS) : 1;

  logic                 state;
  logic [DATA_BITS-1:0] r_data;
  logic [BW-1:0]        bit_cnt;
  logic                 bit_flag;
  logic                 line_bit;
  logic [IW-1:0]        data_pos;   // bit_cnt - 1: index of the data bit being sent

  uart_baud_gen #(
    .CLKS_PER_BIT (CLKS_PER_BIT),
    .FLAG_AT      (CLKS_PER_BIT - 1)
  ) u_baud (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (state),
    .bit_flag (bit_flag)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= 1'b0;
      r_data  <= '0;
      bit_cnt <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!state) begin
        if (start) begin
          state   <= 1'b1;
          r_data  <= data;
          bit_cnt <= '0;
        end
      end else if (bit_flag) begin
        if (bit_cnt == STOP_CNT) begin
          state   <= 1'b0;
          bit_cnt <= '0;
          done    <= 1'b1;
        end else begin
          bit_cnt <= bit_cnt + 1'b1;
        end
      end
    end
  end

  // Level the frame calls for at the current bit position.
  assign data_pos = IW'(bit_cnt - 1'b1);

  always_comb begin
    if (!state)                    line_bit = IDLE_LEVEL;
    else if (bit_cnt == '0)        line_bit = START_LEVEL;
    else if (bit_cnt == STOP_CNT)  line_bit = STOP_LEVEL;
    else                           line_bit = r_data[data_pos];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rs232_tx <= IDLE_LEVEL;
    else        rs232_tx <= line_bit;
  end

  assign busy = state;

endmodule
