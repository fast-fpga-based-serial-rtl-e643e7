// Full-size testbench for serial_rx_top with every parameter at its default
// (64 samples per clock, 8 samples per bit, 32768-entry output FIFO). It
// runs the static data test: the tester sends a frame every 256 samples
// (12.5 MHz frame rate at 3.2 GS/s), its words are looped back into the
// receiver one clock late, and the run continues until the 32 kB FIFO is
// full and capture has stopped. Every frame must be accepted with the
// counter value it carries, exactly 5 clocks after the tester produced its
// start-bit word; then the whole FIFO is read out and must hold the
// sequence 0, 1, ..., 15, 0, 1, ... with no gap.
module tb_serial_rx_full;
  localparam int W = 64, P = 256, DEPTH = 32768, LAT = 5;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] rx_word = '0, tx_word;
  logic rx_frame_valid, rx_frame_reject;
  logic [3:0] rx_frame_data, tx_count;
  logic fifo_rd_en = 0, capture_rearm = 0;
  logic [7:0] fifo_rd_data;
  logic fifo_rd_valid, fifo_empty, fifo_full, capture_stopped;
  logic [15:0] fifo_count;
  logic tx_enable = 1, tx_shorten_ones = 0;
  logic [2:0] tx_distortion = '0;
  logic [15:0] tx_period = 16'(P);
  int checks = 0, failures = 0, frames = 0, fifo_errors = 0;

  serial_rx_top dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (600000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int c, k, exp_k;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    c = 0;
    while (!capture_stopped) begin
      @(posedge clk); #1;
      rx_word = tx_word;
      // frame k has its start bit at sample k*P + 40, in tester word (k*P+40)/W
      exp_k = -1;
      k = (c - LAT) * W / P;
      for (int kk = (k > 0 ? k - 1 : 0); kk <= k + 1; kk++)
        if (c >= LAT && (kk * P + 40) / W + LAT == c) exp_k = kk;
      checks++;
      if (rx_frame_valid !== (exp_k >= 0) || rx_frame_reject ||
          (exp_k >= 0 && rx_frame_data !== 4'(exp_k))) begin
        failures++;
        if (failures < 10) $display("cycle %0d: valid=%b data=%h expected frame %0d", c,
                                    rx_frame_valid, rx_frame_data, exp_k);
      end
      if (rx_frame_valid) frames++;
      c++;
    end
    checks++; if (!fifo_full || fifo_count != 16'(DEPTH)) failures++;
    $display("capture stopped after %0d clocks, %0d frames received", c, frames);
    for (int i = 0; i < DEPTH; i++) begin
      fifo_rd_en = 1; @(posedge clk); #1; fifo_rd_en = 0;
      if (!fifo_rd_valid || fifo_rd_data !== 8'(i % 16)) fifo_errors++;
    end
    checks++; if (fifo_errors != 0) begin failures++; $display("%0d FIFO entries wrong", fifo_errors); end
    checks++; if (!fifo_empty || !capture_stopped) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
