// tx_up_counter: payload source of the frame tester.
//
// A WIDTH-bit counter (default 4 bits, one value per frame) whose value is the
// data of the next frame. It advances by one, wrapping around, in every clock
// in which the frame builder reports that it has taken a frame (increment)
// while the tester is enabled. Reset sets it to 0.
// The document shows the counter, its Increment input and the enable button
// feeding it; the width equal to the frame's data bits and the reset value
// are this design's choices.
module tx_up_counter #(
  parameter int unsigned WIDTH = serial_rx_pkg::DEF_DATA_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             increment,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk) begin
    if (!rst_n)                     count <= '0;
    else if (enable && increment)   count <= count + 1'b1;
  end

endmodule
