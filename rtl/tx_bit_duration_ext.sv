// tx_bit_duration_ext: bit duration extension unit of the frame tester.
//
// Builds the sample-level waveform of one frame at SPB samples per bit:
// IDLE_BITS bits of logical 0, a start bit of logical 1, DATA_BITS data bits
// (first data bit = MSB of data), then one more idle bit that only holds
// the part of a stretched last bit that spills past the nominal frame end.
// Sample 0 of frame_vec is sent first.
//
// Distortion: every run of the chosen value (logical 1 when shorten_ones is
// set, logical 0 otherwise) is made shorter by `distortion` samples, floor
// of half at its leading edge and the rest at its trailing edge; the runs of
// the other value become longer by the same amount, so the frame keeps its
// total duration. For shortened ones this is an erosion and for shortened
// zeros a dilation of the nominal waveform over the window
// i - floor(D/2) .. i + ceil(D/2). With 8 samples per bit, distortion 2, 4
// and 5 are a 25 %, 50 % and 62.5 % shorter bit.
//
// Purely combinational.
// The frame format, the distortion of one value at the expense of the other
// and the constant frame duration follow the document; how the samples are
// taken from each edge is this design's choice.
module tx_bit_duration_ext #(
  parameter int unsigned SPB       = serial_rx_pkg::DEF_SPB_X16 / 16,
  parameter int unsigned IDLE_BITS = serial_rx_pkg::DEF_IDLE_BITS,
  parameter int unsigned DATA_BITS = serial_rx_pkg::DEF_DATA_BITS,
  localparam int unsigned FV       = (IDLE_BITS + DATA_BITS + 2) * SPB
) (
  input  logic [DATA_BITS-1:0] data,
  input  logic                 shorten_ones,
  input  logic [2:0]           distortion,
  output logic [FV-1:0]        frame_vec
);

  localparam int unsigned NB = IDLE_BITS + DATA_BITS + 2;

  logic [NB-1:0] bits;     // bit values in sending order, bits[0] first
  logic [FV-1:0] nominal;

  always_comb begin
    bits = '0;
    bits[IDLE_BITS] = 1'b1;
    for (int unsigned i = 0; i < DATA_BITS; i++)
      bits[IDLE_BITS + 1 + i] = data[DATA_BITS - 1 - i];
    for (int unsigned s = 0; s < FV; s++)
      nominal[s] = bits[s / SPB];
  end

  always_comb begin
    int a, b, j;
    logic all1, any1;
    a = int'(distortion) / 2;
    b = int'(distortion) - a;
    for (int i = 0; i < int'(FV); i++) begin
      all1 = 1'b1;
      any1 = 1'b0;
      for (int d = -3; d <= 4; d++) begin
        j = i + d;
        if (d >= -a && d <= b) begin
          // samples before the frame and after it are idle (logical 0)
          if (j >= 0 && j < int'(FV)) begin
            all1 &= nominal[j];
            any1 |= nominal[j];
          end else begin
            all1 = 1'b0;
          end
        end
      end
      frame_vec[i] = shorten_ones ? all1 : any1;
    end
  end

endmodule
