// uart_rs232_top: full-duplex UART for an RS-232 link, 8N1 frames.
//
// Send side: bytes written with tx_wr_en queue in the transmit FIFO; the
// monitoring unit takes them out one at a time while the FIFO is not empty
// and hands each to the data sending unit, which puts a start bit, eight data
// bits (bit 0 first) and a stop bit on rs232_tx. Receive side: the receiver
// watches rs232_rx for a start bit, samples the frame and presents the byte
// on rx_data with a one-cycle rx_done. The two sides share only the clock
// and reset and can run at the same time. rs232_tx and rs232_rx are logic
// levels; an external RS-232 line driver turns them into the inverted
// +/-12 V line levels of the cable.
//
// The structure (FIFO, monitoring unit, sending unit; receiver), the frame
// format and the 50 MHz clock follow the document. The 9600 baud default,
// the FIFO depth of 16, the active-low asynchronous reset and the error flag
// of the receiver are this design's choices. CLKS_PER_BIT = CLK_FREQ_HZ /
// BAUD_RATE = 5208 at the defaults (9600.6 baud).
module uart_rs232_top #(
  parameter int unsigned CLK_FREQ_HZ = uart_pkg::CLK_FREQ_HZ,
  parameter int unsigned BAUD_RATE   = uart_pkg::BAUD_RATE,
  parameter int unsigned DATA_BITS   = uart_pkg::DATA_BITS,
  parameter int unsigned FIFO_DEPTH  = 16
) (
  input  logic                   clk,            // system clock, 50 MHz
  input  logic                   rst_n,          // asynchronous, active low
  // parallel send side
  input  logic                   tx_wr_en,       // queue tx_wr_data (ignored while tx_full)
  input  logic [DATA_BITS-1:0]   tx_wr_data,
  output logic                   tx_full,        // transmit FIFO full
  output logic                   tx_idle,        // nothing queued, nothing on the line
  output logic [$clog2(FIFO_DEPTH):0] tx_fifo_count, // bytes waiting in the transmit FIFO
  // parallel receive side
  output logic [DATA_BITS-1:0]   rx_data,
  output logic                   rx_done,        // one-cycle pulse, rx_data is new
  output logic                   rx_frame_error, // stop bit of that byte was 0
  output logic                   rx_busy,        // a frame is being received
  // serial side, to and from the RS-232 line driver
  output logic                   rs232_tx,
  input  logic                   rs232_rx
);

  localparam int unsigned CLKS_PER_BIT = uart_pkg::clks_per_bit(CLK_FREQ_HZ, BAUD_RATE);

  logic                 fifo_empty, fifo_rd_en;
  logic [DATA_BITS-1:0] fifo_rd_data;
  logic                 tx_start, tx_busy, tx_done;
  logic [DATA_BITS-1:0] tx_data;

  uart_tx_fifo #(
    .WIDTH (DATA_BITS),
    .DEPTH (FIFO_DEPTH)
  ) u_tx_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (tx_wr_en),
    .wr_data (tx_wr_data),
    .full    (tx_full),
    .rd_en   (fifo_rd_en),
    .rd_data (fifo_rd_data),
    .empty   (fifo_empty),
    .count   (tx_fifo_count)
  );

  uart_tx_monitor #(
    .DATA_BITS (DATA_BITS)
  ) u_tx_monitor (
    .clk          (clk),
    .rst_n        (rst_n),
    .fifo_empty   (fifo_empty),
    .fifo_rd_data (fifo_rd_data),
    .fifo_rd_en   (fifo_rd_en),
    .tx_start     (tx_start),
    .tx_data      (tx_data),
    .tx_busy      (tx_busy),
    .tx_done      (tx_done),
    .tx_idle      (tx_idle)
  );

  uart_tx #(
    .CLKS_PER_BIT (CLKS_PER_BIT),
    .DATA_BITS    (DATA_BITS)
  ) u_tx (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (tx_start),
    .data     (tx_data),
    .rs232_tx (rs232_tx),
    .busy     (tx_busy),
    .done     (tx_done)
  );

  uart_rx #(
    .CLKS_PER_BIT (CLKS_PER_BIT),
    .DATA_BITS    (DATA_BITS)
  ) u_rx (
    .clk         (clk),
    .rst_n       (rst_n),
    .rs232_rx    (rs232_rx),
    .rx_data     (rx_data),
    .done        (rx_done),
    .frame_error (rx_frame_error),
    .busy        (rx_busy)
  );

endmodule
