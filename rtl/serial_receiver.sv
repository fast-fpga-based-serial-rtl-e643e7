// serial_receiver: the receiver's processing chain and output buffer.
//
// rx_word carries W line samples per clock from the deserializing
// transceiver (bit 0 earliest). The chain is
//   frame buffer -> 5-sample majority filter -> frame start detection
//   -> data reconstruction -> output FIFO,
// one register stage per block, so every frame leaves the chain a fixed
// number of clocks after it arrived and frames need no gap between them.
// With the default search window (the middle buffer word), frame_valid or
// frame_reject is set 5 clocks after the word holding the frame's start bit
// was presented on rx_word.
//
// Each accepted frame is written to the FIFO as one entry holding its data
// bits zero-extended to FIFO_WIDTH; rejected frames are not stored, so a
// missing frame shows as a gap in the stored sequence. The FIFO read side is
// the readout port for an external USB bridge.
// The order of the blocks, the one-clock stages and the 32 kB buffer that
// stops when full follow the document; storing only accepted frames, one
// byte each, is this design's choice.
module serial_receiver #(
  parameter int unsigned W           = serial_rx_pkg::DEF_W,
  parameter int unsigned SPB_X16     = serial_rx_pkg::DEF_SPB_X16,
  parameter int unsigned DATA_BITS   = serial_rx_pkg::DEF_DATA_BITS,
  parameter int unsigned START_ZEROS = serial_rx_pkg::DEF_START_ZEROS,
  parameter int unsigned BUF_WORDS   = serial_rx_pkg::DEF_BUF_WORDS,
  parameter int unsigned FIFO_DEPTH  = serial_rx_pkg::DEF_FIFO_DEPTH,
  parameter int unsigned FIFO_WIDTH  = serial_rx_pkg::DEF_FIFO_WIDTH
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [W-1:0]                rx_word,
  output logic                        frame_valid,
  output logic                        frame_reject,
  output logic [DATA_BITS-1:0]        frame_data,
  input  logic                        fifo_rd_en,
  output logic [FIFO_WIDTH-1:0]       fifo_rd_data,
  output logic                        fifo_rd_valid,
  output logic                        fifo_empty,
  output logic                        fifo_full,
  output logic [$clog2(FIFO_DEPTH):0] fifo_count,
  output logic                        capture_stopped,
  input  logic                        capture_rearm
);
  import serial_rx_pkg::*;

  localparam int unsigned NR = W * BUF_WORDS;        // raw buffer length
  localparam int unsigned NF = NR - MAJ_TAPS + 1;    // filtered vector length
  localparam int unsigned SEARCH_BASE = W - (MAJ_TAPS - 1) / 2;

  initial assert (FIFO_WIDTH >= DATA_BITS) else $error("serial_receiver: FIFO_WIDTH < DATA_BITS");

  logic [NR-1:0]        raw_vec;
  logic [NF-1:0]        filt_vec, det_vec;
  logic                 trig;
  logic [$clog2(W)-1:0] offset;

  rx_frame_buffer #(.W(W), .BUF_WORDS(BUF_WORDS)) u_buf (
    .clk, .rst_n, .in_word(rx_word), .buf_vec(raw_vec));

  rx_majority_filter #(.N(NR)) u_filt (
    .clk, .rst_n, .in_vec(raw_vec), .out_vec(filt_vec));

  rx_start_detect #(.N(NF), .W(W), .START_ZEROS(START_ZEROS), .SEARCH_BASE(SEARCH_BASE)) u_det (
    .clk, .rst_n, .vec_in(filt_vec), .trig, .offset, .vec_out(det_vec));

  rx_data_reconstruct #(.N(NF), .W(W), .SEARCH_BASE(SEARCH_BASE), .SPB_X16(SPB_X16),
                        .DATA_BITS(DATA_BITS)) u_rec (
    .clk, .rst_n, .trig, .offset, .vec(det_vec),
    .frame_valid, .frame_reject, .data(frame_data));

  rx_output_fifo #(.WIDTH(FIFO_WIDTH), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(frame_valid), .wr_data(FIFO_WIDTH'(frame_data)),
    .rd_en(fifo_rd_en), .rd_data(fifo_rd_data), .rd_valid(fifo_rd_valid),
    .empty(fifo_empty), .full(fifo_full), .count(fifo_count),
    .stopped(capture_stopped), .capture_rearm);

endmodule
