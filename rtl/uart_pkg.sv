// uart_pkg: constants and types shared by the UART blocks.
//
// The link uses the asynchronous 8N1 frame: one start bit (logic 0), eight
// data bits sent least significant bit first, no parity bit and one stop bit
// (logic 1); the line rests at logic 1 between frames. The 50 MHz system
// clock is the document's figure; the 9600 baud default is a choice of this
// design, since no baud rate is fixed for the main configuration.
package uart_pkg;

  // System clock and default line rate.
  localparam int unsigned CLK_FREQ_HZ  = 50_000_000;
  localparam int unsigned BAUD_RATE    = 9_600;

  // Frame format (8N1).
  localparam int unsigned DATA_BITS    = 8;
  localparam logic        IDLE_LEVEL   = 1'b1;
  localparam logic        START_LEVEL  = 1'b0;
  localparam logic        STOP_LEVEL   = 1'b1;

  // Clock cycles per bit period: the frequency division coefficient.
  function automatic int unsigned clks_per_bit(int unsigned clk_hz, int unsigned baud);
    return clk_hz / baud;
  endfunction

  // States of the transmit monitoring unit.
  typedef enum logic [1:0] {
    MON_IDLE   = 2'd0,  // waiting for the FIFO to hold a byte
    MON_LAUNCH = 2'd1,  // byte taken from the FIFO, start pulse to the transmitter
    MON_WAIT   = 2'd2   // frame on the line, waiting for the transmitter's done
  } tx_mon_state_t;

endpackage
