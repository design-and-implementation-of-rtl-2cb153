// uart_tx_monitor: monitoring logic unit between the transmit FIFO and the
// data sending unit.
//
// It watches the FIFO's empty flag and the transmitter. In MON_IDLE, when
// the FIFO holds a byte, it takes the byte (one-cycle fifo_rd_en), keeps it
// in tx_data and moves to MON_LAUNCH, where it raises tx_start for one cycle.
// In MON_WAIT it waits for tx_done and then looks at the FIFO again. So, as
// the document describes, the FIFO is emptied one frame at a time for as
// long as it is not empty. tx_idle is high when nothing is queued or on the
// line. The document only names this unit; this three-state sequence is the
// simplest one that does its job.
//
// Timing: tx_start comes one cycle after the byte leaves the FIFO; between
// the done of one frame and the start of the next there are three cycles.
module uart_tx_monitor #(
  parameter int unsigned DATA_BITS = uart_pkg::DATA_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,         // asynchronous, active low
  // transmit FIFO side
  input  logic                 fifo_empty,
  input  logic [DATA_BITS-1:0] fifo_rd_data,
  output logic                 fifo_rd_en,
  // transmitter side
  output logic                 tx_start,
  output logic [DATA_BITS-1:0] tx_data,
  input  logic                 tx_busy,
  input  logic                 tx_done,
  // status
  output logic                 tx_idle
);

  import uart_pkg::*;

  tx_mon_state_t state;

  assign fifo_rd_en = (state == MON_IDLE) && !fifo_empty && !tx_busy;
  assign tx_start   = (state == MON_LAUNCH);
  assign tx_idle    = (state == MON_IDLE) && fifo_empty && !tx_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= MON_IDLE;
      tx_data <= '0;
    end else begin
      unique case (state)
        MON_IDLE: if (fifo_rd_en) begin
          tx_data <= fifo_rd_data;
          state   <= MON_LAUNCH;
        end
        MON_LAUNCH: state <= MON_WAIT;
        MON_WAIT:   if (tx_done) state <= MON_IDLE;
        default:    state <= MON_IDLE;
      endcase
    end
  end

  // The transmitter must accept each launch: it is idle when tx_start rises.
  a_launch_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                  tx_start |-> !tx_busy);

endmodule
