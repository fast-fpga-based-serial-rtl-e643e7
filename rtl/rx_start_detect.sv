// rx_start_detect: frame start detection by a parallel comparator array.
//
// One comparator per candidate position o = 0 .. W-1 checks the filtered
// vector for the start pattern: START_ZEROS samples of logical 0 directly
// followed by a logical 1 at position SEARCH_BASE + o. The earliest match
// wins (priority encoder) and gives the frame offset. The W searched
// positions move on by W samples each clock, exactly as far as the buffer
// shifts, so every sample of the line is tested as a frame start exactly once
// and frames may follow each other with no gap.
//
// START_ZEROS (default 32 samples, four bit times) is longer than any run of
// zeros followed by a one inside a frame (at most three data bits) and
// shorter than the five idle bits in front of the start bit, so data bits
// never trigger.
//
// Timing: one register stage. trig/offset and the matching copy of the
// vector (vec_out) appear one clock after vec_in.
// The comparator-per-offset structure and the zeros-then-one pattern follow
// the document; the pattern length and the search window placement are this
// design's choices.
module rx_start_detect #(
  parameter int unsigned N           = serial_rx_pkg::DEF_W * serial_rx_pkg::DEF_BUF_WORDS
                                       - serial_rx_pkg::MAJ_TAPS + 1,
  parameter int unsigned W           = serial_rx_pkg::DEF_W,
  parameter int unsigned START_ZEROS = serial_rx_pkg::DEF_START_ZEROS,
  parameter int unsigned SEARCH_BASE = serial_rx_pkg::DEF_W - (serial_rx_pkg::MAJ_TAPS - 1) / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         vec_in,
  output logic                 trig,
  output logic [$clog2(W)-1:0] offset,
  output logic [N-1:0]         vec_out
);

  initial begin
    assert (SEARCH_BASE >= START_ZEROS) else $error("rx_start_detect: SEARCH_BASE < START_ZEROS");
    assert (SEARCH_BASE + W <= N)       else $error("rx_start_detect: search window beyond vector");
  end

  logic [W-1:0]         match;
  logic                 hit;
  logic [$clog2(W)-1:0] first;

  // Comparator array: one comparator per offset.
  always_comb begin
    for (int unsigned o = 0; o < W; o++)
      match[o] = vec_in[SEARCH_BASE + o] &&
                 (vec_in[SEARCH_BASE + o - START_ZEROS +: START_ZEROS] == '0);
  end

  // Priority encoder: the earliest matching position.
  always_comb begin
    hit   = 1'b0;
    first = '0;
    for (int o = W - 1; o >= 0; o--)
      if (match[o]) begin
        hit   = 1'b1;
        first = o[$clog2(W)-1:0];
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      trig    <= 1'b0;
      offset  <= '0;
      vec_out <= '0;
    end else begin
      trig    <= hit;
      offset  <= first;
      vec_out <= vec_in;
    end
  end

endmodule
