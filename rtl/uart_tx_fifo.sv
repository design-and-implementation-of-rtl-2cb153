// uart_tx_fifo: transmit FIFO holding bytes that wait to be sent.
//
// A synchronous first-in first-out buffer of DEPTH words built as a register
// array with read and write pointers one bit wider than the address, so that
// equal addresses with different top bits mean full. The word at the read
// pointer is always presented on rd_data (show-ahead): rd_en removes it. A
// write while full and a read while empty are ignored; `count` gives the
// fill level. The document names this FIFO but gives neither its depth nor
// its interface: DEPTH = 16 and the show-ahead interface are this design's.
//
// Timing: a word written in one cycle can be read from the next; full, empty
// and count change on the clock edge after the write or read.
module uart_tx_fifo #(
  parameter int unsigned WIDTH = uart_pkg::DATA_BITS,
  parameter int unsigned DEPTH = 16   // a power of two
) (
  input  logic                     clk,
  input  logic                     rst_n,    // asynchronous, active low
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     full,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,  // oldest word, valid while !empty
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full  = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);
  assign empty = (wr_ptr == rd_ptr);
  assign count = wr_ptr - rd_ptr;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  assign rd_data = mem[rd_ptr[AW-1:0]];

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("DEPTH must be a power of two, at least 2");

endmodule
