// rx_output_fifo: data output buffer between the receiver chain and the
// readout interface (a USB 2.0 bridge outside the FPGA).
//
// A synchronous FIFO of DEPTH entries of WIDTH bits (default 32768 x 8 bits,
// 32 kB), held in one memory array. Capture stops when the FIFO is full:
// the stopped flag is set and every later write is dropped, even after
// entries have been read, until capture_rearm is pulsed. This keeps one
// contiguous block of frames in the buffer for readout.
//
// Write: wr_en/wr_data, taken at the clock edge when not stopped.
// Read: rd_en pops the oldest entry; rd_data is valid one clock later, marked
// by rd_valid. rd_en while empty is ignored. count gives the fill level.
// The 32 kB size and the stop-when-full behaviour follow the document; the
// entry width, the re-arm input and the read timing are this design's
// choices.
module rx_output_fifo #(
  parameter int unsigned WIDTH = serial_rx_pkg::DEF_FIFO_WIDTH,
  parameter int unsigned DEPTH = serial_rx_pkg::DEF_FIFO_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     rd_valid,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     stopped,
  input  logic                     capture_rearm
);

  localparam int unsigned AW = $clog2(DEPTH);

  initial assert (DEPTH == 2 ** AW) else $error("rx_output_fifo: DEPTH must be a power of two");

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !stopped && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
    if (do_rd) rd_data <= mem[rd_ptr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      rd_valid <= 1'b0;
      stopped  <= 1'b0;
    end else begin
      rd_valid <= do_rd;
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (capture_rearm)
        stopped <= 1'b0;
      else if (full || (do_wr && !do_rd && count == (AW+1)'(DEPTH - 1)))
        stopped <= 1'b1;
    end
  end

endmodule
