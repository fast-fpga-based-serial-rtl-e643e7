// frame_tester: transmitter logic of the receiver's test board.
//
// An up-counter supplies the data of each frame, the bit duration extension
// unit turns it into a (possibly distorted) sample waveform, and the frame
// builder places one frame every `period` samples into the outgoing stream of
// W-sample words for a transmit transceiver running at the receiver's
// sampling rate. The counter advances once per frame sent, so a receiver that
// stores every frame sees an incrementing sequence and any missed frame shows
// as a gap. enable is the tester's enable button.
// The three blocks and their connections (counter, bit duration extension,
// frame build and shift register, Increment back to the counter) follow the
// document's test setup; running at the receiver's sample rate is this
// design's choice.
module frame_tester #(
  parameter int unsigned W         = serial_rx_pkg::DEF_W,
  parameter int unsigned SPB       = serial_rx_pkg::DEF_SPB_X16 / 16,
  parameter int unsigned IDLE_BITS = serial_rx_pkg::DEF_IDLE_BITS,
  parameter int unsigned DATA_BITS = serial_rx_pkg::DEF_DATA_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic                 shorten_ones,
  input  logic [2:0]           distortion,
  input  logic [15:0]          period,
  output logic [W-1:0]         tx_word,
  output logic [DATA_BITS-1:0] count
);

  localparam int unsigned FV = (IDLE_BITS + DATA_BITS + 2) * SPB;

  logic          increment;
  logic [FV-1:0] frame_vec;

  tx_up_counter #(.WIDTH(DATA_BITS)) u_cnt (
    .clk, .rst_n, .enable, .increment, .count);

  tx_bit_duration_ext #(.SPB(SPB), .IDLE_BITS(IDLE_BITS), .DATA_BITS(DATA_BITS)) u_ext (
    .data(count), .shorten_ones, .distortion, .frame_vec);

  tx_frame_builder #(.W(W), .FV(FV)) u_bld (
    .clk, .rst_n, .enable, .period, .frame_vec, .increment, .tx_word);

endmodule
