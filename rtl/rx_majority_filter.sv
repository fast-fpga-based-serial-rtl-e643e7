// rx_majority_filter: 5-sample majority filter applied to every position of
// the buffered sample vector in parallel.
//
// Output sample j is the majority of input samples j .. j+4, that is the
// filtered value of input sample j+2; the output is therefore 4 samples
// shorter than the input, and output bit j lines up with input bit j+2.
// A pulse or gap of 1 or 2 samples is removed, while runs of 3 or more
// samples keep their length and position.
//
// Timing: one register stage (the whole vector is filtered in one clock).
// The document gives the filter as a 5-bit majority parallel filter; the
// alignment and the registered output are this design's choices.
module rx_majority_filter #(
  parameter int unsigned N = serial_rx_pkg::DEF_W * serial_rx_pkg::DEF_BUF_WORDS
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [N-1:0]                        in_vec,
  output logic [N-serial_rx_pkg::MAJ_TAPS:0]  out_vec
);
  import serial_rx_pkg::*;

  localparam int unsigned M = N - MAJ_TAPS + 1;

  logic [M-1:0] filt;

  always_comb begin
    for (int unsigned j = 0; j < M; j++)
      filt[j] = maj5(in_vec[j +: MAJ_TAPS]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_vec <= '0;
    else        out_vec <= filt;
  end

endmodule
