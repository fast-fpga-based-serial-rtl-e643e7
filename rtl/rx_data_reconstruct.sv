// rx_data_reconstruct: sampling point selection and data restoration.
//
// When trig is set, the filtered vector is shifted by SEARCH_BASE + offset so
// that the start bit begins at sample 0. No receive clock exists, so the bit
// windows are placed from the nominal samples-per-bit ratio SPB_X16/16: bit k
// (k = 0 is the start bit) covers samples bit_start(k) .. bit_start(k+1)-1.
//
// Edge avoidance: a sample is a usable sampling point only when both of its
// neighbours carry the same value, i.e. when no transition touches it. Inside
// each window the candidates are tried from the window centre outwards
// (centre, centre-1, centre+1, centre-2, ...) and the first usable one gives
// the bit. A bit whose window holds no usable point (fewer than 3 equal
// samples in a row) makes the whole frame rejected, as does a start bit that
// does not read as 1.
//
// Outputs: frame_valid with data (first data bit in the MSB), or
// frame_reject, for one clock, one register stage after trig.
// The shift by the start offset, the ratio-based bit spacing, the edge
// avoidance and the 3-sample minimum follow the document; the centre-outward
// search order and the reject flag are this design's choices.
module rx_data_reconstruct #(
  parameter int unsigned N           = serial_rx_pkg::DEF_W * serial_rx_pkg::DEF_BUF_WORDS
                                       - serial_rx_pkg::MAJ_TAPS + 1,
  parameter int unsigned W           = serial_rx_pkg::DEF_W,
  parameter int unsigned SEARCH_BASE = serial_rx_pkg::DEF_W - (serial_rx_pkg::MAJ_TAPS - 1) / 2,
  parameter int unsigned SPB_X16     = serial_rx_pkg::DEF_SPB_X16,
  parameter int unsigned DATA_BITS   = serial_rx_pkg::DEF_DATA_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 trig,
  input  logic [$clog2(W)-1:0] offset,
  input  logic [N-1:0]         vec,
  output logic                 frame_valid,
  output logic                 frame_reject,
  output logic [DATA_BITS-1:0] data
);
  import serial_rx_pkg::*;

  localparam int unsigned TAIL = frame_tail(DATA_BITS, SPB_X16);
  localparam int unsigned L    = TAIL + 2;  // one extra sample on each side

  initial begin
    assert (SEARCH_BASE >= 1) else $error("rx_data_reconstruct: SEARCH_BASE must be >= 1");
    assert (SEARCH_BASE + W - 1 + TAIL < N) else $error("rx_data_reconstruct: frame does not fit the vector");
    assert (SPB_X16 >= 64) else $error("rx_data_reconstruct: at least 4 samples per bit are needed");
  end

  // seg[x+1] is sample x of the frame, x = -1 .. TAIL.
  logic [L-1:0]         seg;
  logic [DATA_BITS:0]   bit_val;
  logic [DATA_BITS:0]   bit_ok;

  always_comb begin
    seg = L'(vec >> (SEARCH_BASE + 32'(offset) - 1));
  end

  always_comb begin
    for (int unsigned k = 0; k <= DATA_BITS; k++) begin
      int unsigned ws, len, c, x;
      ws  = bit_start(k, SPB_X16);
      len = bit_start(k + 1, SPB_X16) - ws;
      c   = len / 2;
      bit_ok[k]  = 1'b0;
      bit_val[k] = 1'b0;
      // Walk the candidates from the far end of the search order back to the
      // centre, so the candidate nearest the centre is the one that stays.
      for (int d = int'(len) - 1; d >= 0; d--) begin
        x = (d % 2 == 0) ? ws + c + d / 2 : ws + c - (d + 1) / 2;
        if (seg[x] == seg[x + 1] && seg[x + 1] == seg[x + 2]) begin
          bit_ok[k]  = 1'b1;
          bit_val[k] = seg[x + 1];
        end
      end
    end
  end

  logic accept;
  assign accept = (&bit_ok) && bit_val[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      frame_valid  <= 1'b0;
      frame_reject <= 1'b0;
      data         <= '0;
    end else begin
      frame_valid  <= trig && accept;
      frame_reject <= trig && !accept;
      if (trig && accept)
        for (int unsigned i = 0; i < DATA_BITS; i++)
          data[DATA_BITS - 1 - i] <= bit_val[i + 1];
    end
  end

endmodule
