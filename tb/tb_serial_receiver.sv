// Self-checking testbench for serial_receiver (FIFO depth 16). The
// testbench draws a sample stream of frames (5 idle bits, start bit, 4 data
// bits, 8 samples per bit) at random spacing down to back-to-back, with the
// data-bit edges moved by up to +-2 samples, 1- and 2-sample glitches in the
// idle runs, and in some frames a square wave with 2-sample runs over the
// last data bit, which leaves it no sampling point. Each frame must give
// frame_valid with its data, or frame_reject for the square-wave frames,
// exactly 5 clocks after the word holding its start bit is presented, and
// nothing else may come out. Accepted frames must appear in the FIFO in
// order until it is full; then capture stops, reads drain it, and a re-arm
// lets frames in again.
module tb_serial_receiver;
  localparam int W = 64, SPB = 8, NFR = 300, LEN = NFR * 130 + 4 * W;
  localparam int NWORDS = LEN / W, LAT = 4;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] rx_word = '0;
  logic frame_valid, frame_reject;
  logic [3:0] frame_data;
  logic fifo_rd_en = 0, capture_rearm = 0;
  logic [7:0] fifo_rd_data;
  logic fifo_rd_valid, fifo_empty, fifo_full, capture_stopped;
  logic [4:0] fifo_count;

  logic line [LEN];
  // expected event per output cycle: 0 none, 1 valid, 2 reject
  int   ev_kind [NWORDS + LAT + 2];
  logic [3:0] ev_data [NWORDS + LAT + 2];
  logic [7:0] accepted_q[$];
  int checks = 0, failures = 0;
  int n_valid = 0, n_reject = 0, n_glitch = 0, n_b2b = 0, n_jitter = 0;

  serial_receiver #(.FIFO_DEPTH(16)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic build_stream();
    int f, b0, k, gap, j0, j1, s0, s1;
    logic [3:0] d;
    logic bv, burst;
    foreach (line[i]) line[i] = 0;
    foreach (ev_kind[i]) ev_kind[i] = 0;
    f = 100;
    for (int n = 0; n < NFR; n++) begin
      d = 4'($urandom);
      burst = (n % 9 == 4);
      b0 = f + 5 * SPB;                       // first sample of the start bit
      j1 = 0;
      for (k = 0; k <= 4; k++) begin
        bv = (k == 0) ? 1'b1 : d[4 - k];
        j0 = j1;                              // this bit starts where the last ended
        j1 = (k == 4 || burst) ? 0 : int'($urandom_range(0, 4)) - 2;
        if (j1 != 0) n_jitter++;
        s0 = b0 + k * SPB + j0;
        s1 = b0 + (k + 1) * SPB + j1;
        for (int s = s0; s < s1; s++) line[s] = bv;
      end
      if (burst) begin
        for (int s = b0 + 4 * SPB - 4; s < b0 + 5 * SPB + 4; s++) line[s] = (s % 4) < 2;
      end
      // glitches in the idle run in front of this frame
      if (n % 3 == 1) begin
        line[f + 8] = 1'b1; n_glitch++;
        line[f + 20] = 1'b1; line[f + 21] = 1'b1; n_glitch++;
      end
      ev_kind[b0 / W + LAT] = burst ? 2 : 1;
      ev_data[b0 / W + LAT] = d;
      gap = (n % 4 == 0) ? 0 : int'($urandom_range(4, 120));
      if (gap == 0) n_b2b++;
      f += 10 * SPB + gap;
      if (f + 12 * SPB >= LEN - 2 * W) break;
    end
  endtask

  initial begin
    build_stream();
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int c = 0; c < NWORDS; c++) begin
      for (int s = 0; s < W; s++) rx_word[s] = line[c * W + s];
      @(posedge clk); #1;
      checks++;
      if (frame_valid !== (ev_kind[c] == 1) || frame_reject !== (ev_kind[c] == 2) ||
          (ev_kind[c] == 1 && frame_data !== ev_data[c])) begin
        failures++;
        $display("cycle %0d: valid=%b reject=%b data=%h expected kind %0d data %h",
                 c, frame_valid, frame_reject, frame_data, ev_kind[c], ev_data[c]);
      end
      if (frame_valid) begin
        n_valid++;
        if (accepted_q.size() < 16) accepted_q.push_back({4'h0, frame_data});
      end
      if (frame_reject) n_reject++;
    end
    // FIFO: full, capture stopped, holds the first 16 accepted frames
    checks++; if (!capture_stopped || !fifo_full || fifo_count != 16) failures++;
    rx_word = '0;
    for (int i = 0; i < 16; i++) begin
      fifo_rd_en = 1; @(posedge clk); #1; fifo_rd_en = 0;
      checks++;
      if (!fifo_rd_valid || fifo_rd_data !== accepted_q[i]) begin
        failures++; $display("fifo entry %0d: %h expected %h", i, fifo_rd_data, accepted_q[i]);
      end
    end
    checks++; if (!fifo_empty || !capture_stopped) failures++;
    capture_rearm = 1; @(posedge clk); #1; capture_rearm = 0;
    checks++; if (capture_stopped) failures++;
    // every mechanism must have happened
    checks++; if (n_valid < 100 || n_reject < 10 || n_glitch < 50 || n_b2b < 20 || n_jitter < 100) begin
      failures++; $display("mechanism missing");
    end
    $display("valid=%0d reject=%0d glitches=%0d back_to_back=%0d jittered_edges=%0d",
             n_valid, n_reject, n_glitch, n_b2b, n_jitter);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
