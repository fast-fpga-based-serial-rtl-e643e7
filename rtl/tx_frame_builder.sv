// tx_frame_builder: frame format build and output shift register of the
// frame tester.
//
// Every `period` samples (the frame repeat period, e.g. 1000 samples for a
// 3.2 MHz frame rate at 3.2 GS/s) the frame waveform is OR-ed into an outgoing sample
// shift register at the sample offset where the frame is due, which can be
// anywhere inside a word. Each clock the register's lowest W samples go out
// as tx_word (bit 0 first) to the transmit transceiver and the register moves
// on by W. `increment` is set in the clock in which a frame is taken, so the
// up-counter supplies the next value for the following frame.
//
// `to_next` counts the samples from the start of the next output word to the
// next frame start. While enable is low the frame slots keep their timing but
// stay empty. period must be at least W and at least the 80-sample frame;
// the spare idle bit at the end of the waveform may overlap the next frame.
// Timing: tx_word is registered; a frame taken in clock t begins in the word
// output at clock t+1.
// The shift register, the frame build and the Increment signal to the counter
// follow the document; the sample-exact placement is this design's choice.
module tx_frame_builder #(
  parameter int unsigned W  = serial_rx_pkg::DEF_W,
  parameter int unsigned FV = (serial_rx_pkg::DEF_IDLE_BITS + serial_rx_pkg::DEF_DATA_BITS + 2)
                              * (serial_rx_pkg::DEF_SPB_X16 / 16)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic [15:0]   period,
  input  logic [FV-1:0] frame_vec,
  output logic          increment,
  output logic [W-1:0]  tx_word
);

  localparam int unsigned SRL = FV + W;

  logic [SRL-1:0] sr, sr_next;
  logic [16:0]    to_next;
  logic           slot;

  assign slot      = (to_next < 17'(W));
  assign increment = slot && enable;

  always_comb begin
    sr_next = sr;
    if (increment)
      sr_next = sr | (SRL'(frame_vec) << to_next);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr      <= '0;
      to_next   <= '0;
      tx_word <= '0;
    end else begin
      tx_word <= sr_next[W-1:0];
      sr      <= sr_next >> W;
      if (slot) to_next <= to_next + 17'(period) - 17'(W);
      else      to_next <= to_next - 17'(W);
    end
  end

  always_ff @(posedge clk)
    if (rst_n) assert (period >= 16'(W)) else $error("tx_frame_builder: period shorter than a word");

endmodule
