// rx_frame_buffer: frame buffer at the head of the receiver chain.
//
// Every clock the transceiver delivers W new samples (bit 0 earliest). The
// buffer keeps the last BUF_WORDS words as one contiguous vector, oldest
// samples at bit 0 and the newest word in the top W bits, so that a whole
// frame, with the idle run in front of it, is visible at once even when it
// straddles word boundaries. With the defaults (3 x 64 = 192 samples) a
// 10-bit frame of 80 samples plus the 32-sample start pattern fits wherever
// it begins inside the middle word.
//
// Timing: one register stage; buf_vec changes one clock after in_word.
// The document states only that the buffer lets an entire frame be captured;
// the depth in words and the reset to all zeros (an idle line) are this
// design's choices.
module rx_frame_buffer #(
  parameter int unsigned W         = serial_rx_pkg::DEF_W,
  parameter int unsigned BUF_WORDS = serial_rx_pkg::DEF_BUF_WORDS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [W-1:0]           in_word,
  output logic [W*BUF_WORDS-1:0] buf_vec
);

  initial assert (BUF_WORDS >= 2) else $error("rx_frame_buffer: BUF_WORDS must be at least 2");

  always_ff @(posedge clk) begin
    if (!rst_n) buf_vec <= '0;
    else        buf_vec <= {in_word, buf_vec[W*BUF_WORDS-1:W]};
  end

endmodule
