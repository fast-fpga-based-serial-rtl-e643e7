// Self-checking testbench for rx_frame_buffer: random words are pushed in and
// the buffered vector is compared with the last three words kept by the
// testbench (oldest at bit 0), including the all-zero state after reset.
module tb_rx_frame_buffer;
  localparam int W = 64, NW = 3;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] in_word = '0;
  logic [W*NW-1:0] buf_vec;
  logic [W-1:0] hist [NW];
  int checks = 0, failures = 0;

  rx_frame_buffer #(.W(W), .BUF_WORDS(NW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (hist[i]) hist[i] = '0;
    @(posedge clk); @(posedge clk); #1;
    checks++; if (buf_vec !== '0) failures++;
    rst_n = 1;
    for (int c = 0; c < 200; c++) begin
      in_word = {$urandom, $urandom};
      @(posedge clk); #1;
      for (int i = 0; i < NW - 1; i++) hist[i] = hist[i+1];
      hist[NW-1] = in_word;
      for (int i = 0; i < NW; i++) begin
        checks++;
        if (buf_vec[i*W +: W] !== hist[i]) begin
          failures++;
          $display("cycle %0d word %0d: got %h expected %h", c, i, buf_vec[i*W +: W], hist[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
