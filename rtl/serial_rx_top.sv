// serial_rx_top: oversampling serial receiver and its frame tester.
//
// Two independent parts share only the clock and reset:
//  * the receiver (serial_receiver): W line samples per clock from the
//    receive transceiver on rx_word, restored frames on rx_frame_* and in
//    the output FIFO, whose read port serves the external readout bridge;
//  * the tester (frame_tester): counter-driven frames with optional bit
//    duration distortion, as W-sample words on tx_word for a transmit
//    transceiver.
// In a loop-back test tx_word drives rx_word through the two transceivers
// and the cable; here that connection is left to the instantiating level.
// Defaults: 64 samples per 50 MHz clock (3.2 GS/s), 8 samples per bit
// (400 Mbit/s), frames of 5 idle bits, a start bit and 4 data bits, and a
// 32 kB output FIFO, all as in the document. Placing receiver and tester
// side by side in one top, with the loop-back left outside, is this
// design's choice.
module serial_rx_top #(
  parameter int unsigned W           = serial_rx_pkg::DEF_W,
  parameter int unsigned SPB_X16     = serial_rx_pkg::DEF_SPB_X16,
  parameter int unsigned DATA_BITS   = serial_rx_pkg::DEF_DATA_BITS,
  parameter int unsigned IDLE_BITS   = serial_rx_pkg::DEF_IDLE_BITS,
  parameter int unsigned START_ZEROS = serial_rx_pkg::DEF_START_ZEROS,
  parameter int unsigned BUF_WORDS   = serial_rx_pkg::DEF_BUF_WORDS,
  parameter int unsigned FIFO_DEPTH  = serial_rx_pkg::DEF_FIFO_DEPTH,
  parameter int unsigned FIFO_WIDTH  = serial_rx_pkg::DEF_FIFO_WIDTH
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // receiver
  input  logic [W-1:0]                rx_word,
  output logic                        rx_frame_valid,
  output logic                        rx_frame_reject,
  output logic [DATA_BITS-1:0]        rx_frame_data,
  input  logic                        fifo_rd_en,
  output logic [FIFO_WIDTH-1:0]       fifo_rd_data,
  output logic                        fifo_rd_valid,
  output logic                        fifo_empty,
  output logic                        fifo_full,
  output logic [$clog2(FIFO_DEPTH):0] fifo_count,
  output logic                        capture_stopped,
  input  logic                        capture_rearm,
  // tester
  input  logic                        tx_enable,
  input  logic                        tx_shorten_ones,
  input  logic [2:0]                  tx_distortion,
  input  logic [15:0]                 tx_period,
  output logic [W-1:0]                tx_word,
  output logic [DATA_BITS-1:0]        tx_count
);

  serial_receiver #(
    .W(W), .SPB_X16(SPB_X16), .DATA_BITS(DATA_BITS), .START_ZEROS(START_ZEROS),
    .BUF_WORDS(BUF_WORDS), .FIFO_DEPTH(FIFO_DEPTH), .FIFO_WIDTH(FIFO_WIDTH)
  ) u_rx (
    .clk, .rst_n, .rx_word,
    .frame_valid(rx_frame_valid), .frame_reject(rx_frame_reject), .frame_data(rx_frame_data),
    .fifo_rd_en, .fifo_rd_data, .fifo_rd_valid, .fifo_empty, .fifo_full, .fifo_count,
    .capture_stopped, .capture_rearm);

  frame_tester #(
    .W(W), .SPB(SPB_X16 / 16), .IDLE_BITS(IDLE_BITS), .DATA_BITS(DATA_BITS)
  ) u_tx (
    .clk, .rst_n, .enable(tx_enable), .shorten_ones(tx_shorten_ones),
    .distortion(tx_distortion), .period(tx_period), .tx_word, .count(tx_count));

endmodule
