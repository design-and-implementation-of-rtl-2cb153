// uart_rx: receiver, serial 8N1 frame in, parallel byte out.
//
// The serial input passes two synchronising flip-flops, and a third holds
// the previous level so that a high-to-low change (the front of a start bit)
// can be seen. On that change the receiver enters its working state and
// starts a baud counter whose bit_flag falls in the middle of each bit
// period. bit_cnt advances on every bit_flag: at bit_cnt = 0 the start bit is
// checked again, and if the line has gone back high the change is taken as
// line noise and the receiver returns to idle. At bit_cnt = 1..DATA_BITS the
// data bits are shifted in, bit 0 first. At the stop bit the byte is copied
// to rx_data, `done` pulses for one cycle and the state drops, in the middle
// of the stop bit, so the next start bit is never missed.
//
// Following the document: start-bit detection on the falling edge, the
// bit_cnt sequence, data received from low to high bit, the state falling
// and done rising at the end. This design's choices: the mid-bit sampling
// point, the noise re-check of the start bit, and frame_error, which is high
// with done when the stop bit was read as 0 (the byte is still delivered).
//
// Timing: done and rx_data come about 3 + (DATA_BITS + 1.5) * CLKS_PER_BIT
// cycles after the start edge reaches rs232_rx; rx_data and frame_error then
// hold until the next frame ends.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = uart_pkg::clks_per_bit(uart_pkg::CLK_FREQ_HZ,
                                                               uart_pkg::BAUD_RATE),
  parameter int unsigned DATA_BITS    = uart_pkg::DATA_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,        // asynchronous, active low
  input  logic                 rs232_rx,     // serial line, logic level
  output logic [DATA_BITS-1:0] rx_data,      // last byte received
  output logic                 done,         // one-cycle pulse: rx_data is new
  output logic                 frame_error,  // stop bit of that byte was 0
  output logic                 busy          // working state
);

  import uart_pkg::*;

  localparam int unsigned BW = $clog2(DATA_BITS + 2);
  localparam logic [BW-1:0] STOP_CNT = BW'(DATA_BITS + 1);

  logic                 rx_s1, rx_s2, rx_s3;
  logic                 start_edge;
  logic                 state;
  logic [BW-1:0]        bit_cnt;
  logic                 bit_flag;
  logic [DATA_BITS-1:0] shift;

  // Synchroniser and edge detector.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_s1 <= IDLE_LEVEL;
      rx_s2 <= IDLE_LEVEL;
      rx_s3 <= IDLE_LEVEL;
    end else begin
      rx_s1 <= rs232_rx;
      rx_s2 <= rx_s1;
      rx_s3 <= rx_s2;
    end
  end

  assign start_edge = (rx_s3 == IDLE_LEVEL) && (rx_s2 == START_LEVEL);

  uart_baud_gen #(
    .CLKS_PER_BIT (CLKS_PER_BIT),
    .FLAG_AT      (CLKS_PER_BIT / 2 - 1)
  ) u_baud (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (state),
    .bit_flag (bit_flag)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= 1'b0;
      bit_cnt     <= '0;
      shift       <= '0;
      rx_data     <= '0;
      done        <= 1'b0;
      frame_error <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!state) begin
        if (start_edge) begin
          state   <= 1'b1;
          bit_cnt <= '0;
        end
      end else if (bit_flag) begin
        if (bit_cnt == '0) begin
          if (rx_s2 == START_LEVEL) bit_cnt <= bit_cnt + 1'b1;
          else                      state   <= 1'b0;   // noise, not a start bit
        end else if (bit_cnt == STOP_CNT) begin
          state       <= 1'b0;
          bit_cnt     <= '0;
          rx_data     <= shift;
          done        <= 1'b1;
          frame_error <= (rx_s2 != STOP_LEVEL);
        end else begin
          shift   <= {rx_s2, shift[DATA_BITS-1:1]};
          bit_cnt <= bit_cnt + 1'b1;
        end
      end
    end
  end

  assign busy = state;

endmodule
