// End-to-end testbench for serial_rx_top (output FIFO reduced to 64
// entries). The tester's words are looped back into the receiver through a
// channel model one word late; the channel can flip single samples that sit
// inside long runs (glitches) and can overwrite the last data bit of chosen
// frames with a square wave of 2-sample runs (bursts).
//
// Frame k starts at stream sample k*period and carries k mod 16. Its result
// is expected exactly 6 clocks after the tester produced the word holding
// its start bit (1 word channel delay, 5 clocks through the receiver).
// Phases:
//   dynamic test, period 1000 samples, with glitches and bursts
//   static test, period 256 samples
//   back-to-back frames, period 80, filling the FIFO: capture stops, the
//     FIFO is read out and checked, then re-armed
//   distortion of 25 % and 37.5 % on the ones and on the zeros: no errors
//   distortion of 50 % and 62.5 %: errors are counted and reported
// Each mechanism (accept, glitch removal, reject, back-to-back frames, many
// start offsets, FIFO stop and re-arm, both distortion directions, errors at
// 62.5 %) is counted and must have happened.
module tb_serial_rx_top;
  localparam int W = 64, DEPTH = 64, LAT = 6;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] rx_word = '0, tx_word;
  logic rx_frame_valid, rx_frame_reject;
  logic [3:0] rx_frame_data, tx_count;
  logic fifo_rd_en = 0, capture_rearm = 0;
  logic [7:0] fifo_rd_data;
  logic fifo_rd_valid, fifo_empty, fifo_full, capture_stopped;
  logic [6:0] fifo_count;
  logic tx_enable = 0, tx_shorten_ones = 0;
  logic [2:0] tx_distortion = '0;
  logic [15:0] tx_period = 16'd1000;

  serial_rx_top #(.FIFO_DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  int n_accept = 0, n_reject = 0, n_glitch = 0, n_burst = 0, n_b2b = 0;
  int n_stop = 0, n_rearm = 0, n_short1 = 0, n_short0 = 0, n_err62 = 0;
  bit offs_seen [W];

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Runs one phase; returns the number of frames whose result was wrong or
  // missing. strict: every such frame is a failure.
  task automatic run_phase(input int per, input bit ones, input int dd, input bit glitches,
                           input bit bursts, input int nframes, input bit strict,
                           output int errors, output int nev, input bit keep_fifo = 0);
    int ncyc, a, b, st, k_next, shift;
    logic [W-1:0] w0, w1, w2;       // tx words c-2, c-1, c
    logic line [3*W];
    int  ev_k [int];                // output cycle -> frame number
    bit  ev_burst [int];
    longint base, last_g;
    errors = 0; last_g = -100;
    tx_period = 16'(per); tx_shorten_ones = ones; tx_distortion = 3'(dd); tx_enable = 1;
    a = dd / 2; b = dd - a;
    shift = ones ? a : -b;
    ncyc = (nframes * per + 80) / W + LAT + 2;
    // the tester keeps sending after frame nframes-1: expect those too
    nev = 0;
    for (int k = 0; (k * per + 40 + shift) / W + LAT < ncyc; k++) begin
      nev++;
      st = k * per + 40 + shift;
      ev_k[st / W + LAT] = k;
      ev_burst[st / W + LAT] = bursts && (k % 5 == 2) && k < nframes;
      offs_seen[st % W] = 1;
      if (bursts && (k % 5 == 2) && k < nframes) n_burst++;
    end
    if (!keep_fifo) begin
      rst_n = 0; rx_word = '0; repeat (3) @(posedge clk); #1 rst_n = 1;
    end
    w0 = '0; w1 = '0; w2 = '0;
    for (int c = 0; c < ncyc; c++) begin
      @(posedge clk); #1;
      // receiver outputs after edge c
      if (ev_k.exists(c)) begin
        int k = ev_k[c];
        bit ok;
        if (ev_burst[c]) ok = rx_frame_reject && !rx_frame_valid;
        else             ok = rx_frame_valid && rx_frame_data == 4'(k);
        checks++;
        if (!ok) begin
          errors++;
          if (strict) begin
            failures++;
            $display("period %0d D %0d frame %0d: valid=%b reject=%b data=%h", per, dd, k,
                     rx_frame_valid, rx_frame_reject, rx_frame_data);
          end
        end
      end else if (strict) begin
        checks++;
        if (rx_frame_valid || rx_frame_reject) begin
          failures++;
          $display("period %0d: unexpected output at cycle %0d: valid=%b reject=%b data=%h",
                   per, c, rx_frame_valid, rx_frame_reject, rx_frame_data);
        end
      end
      if (rx_frame_valid) n_accept++;
      if (rx_frame_reject) n_reject++;
      // channel: word c-1 goes out, with glitches and bursts
      w0 = w1; w1 = w2; w2 = tx_word;
      for (int s = 0; s < W; s++) begin
        line[s] = w0[s]; line[W + s] = w1[s]; line[2*W + s] = w2[s];
      end
      base = longint'(c - 1) * W;
      for (int s = W; s < 2 * W; s++) begin
        bit flat = 1;
        for (int t = -3; t <= 3; t++) if (line[s + t] != line[s]) flat = 0;
        // glitches at least 8 samples apart, so at most one per filter window
        if (glitches && flat && base + s - W >= last_g + 8 && $urandom_range(0, 39) == 0) begin
          rx_word[s - W] = !line[s]; n_glitch++; last_g = base + s - W;
        end else rx_word[s - W] = line[s];
        if (bursts) begin
          longint abs_s = base + s - W;
          longint k = abs_s / per, r = abs_s % per;
          if (k % 5 == 2 && k < nframes && r >= 40 + 32 - 4 && r < 80 + 4)
            rx_word[s - W] = (r % 4) < 2;
        end
      end
    end
  endtask

  initial begin
    int e, n;
    // dynamic test rate with glitches and bursts
    run_phase(1000, 0, 0, 1, 1, 60, 1, e, n);
    // static test rate
    run_phase(256, 0, 0, 1, 0, 80, 1, e, n);
    // back-to-back frames; 150 frames overflow the 64-entry FIFO
    run_phase(80, 0, 0, 0, 0, 150, 1, e, n);
    n_b2b = 150;
    checks++;
    if (capture_stopped && fifo_full && fifo_count == 7'(DEPTH)) n_stop++;
    else begin failures++; $display("capture did not stop"); end
    for (int i = 0; i < DEPTH; i++) begin
      fifo_rd_en = 1; @(posedge clk); #1; fifo_rd_en = 0;
      checks++;
      if (!fifo_rd_valid || fifo_rd_data !== 8'(i % 16)) begin
        failures++; $display("fifo entry %0d = %h", i, fifo_rd_data);
      end
    end
    checks++; if (!fifo_empty || !capture_stopped) failures++;
    capture_rearm = 1; @(posedge clk); #1; capture_rearm = 0;
    run_phase(80, 0, 0, 0, 0, 20, 0, e, n, 1);
    checks++;
    if (!capture_stopped && fifo_count >= 7'd10) n_rearm++;
    else begin failures++; $display("re-arm failed, count %0d", fifo_count); end
    // tolerated distortion: 2 and 3 samples of 8 (25 %, 37.5 %)
    for (int dd = 2; dd <= 3; dd++) begin
      run_phase(1000, 1, dd, 0, 0, 40, 1, e, n); n_short1 += n - e;
      run_phase(1000, 0, dd, 0, 0, 40, 1, e, n); n_short0 += n - e;
    end
    // 50 % and 62.5 %: report the error rate
    for (int dd = 4; dd <= 5; dd++) begin
      for (int v = 1; v >= 0; v--) begin
        run_phase(1000, 1'(v), dd, 0, 0, 64, 0, e, n);
        $display("bit \"%0d\" shortened by %0d of 8 samples: %0d of %0d frames wrong or missed",
                 v, dd, e, n);
        if (dd == 5) n_err62 += e;
      end
    end
    begin
      int noffs = 0;
      foreach (offs_seen[i]) noffs += offs_seen[i];
      $display("accepted=%0d rejected=%0d glitches=%0d bursts=%0d back_to_back=%0d offsets=%0d",
               n_accept, n_reject, n_glitch, n_burst, n_b2b, noffs);
      $display("fifo_stop=%0d rearm=%0d short_ones_ok=%0d short_zeros_ok=%0d errors_at_62=%0d",
               n_stop, n_rearm, n_short1, n_short0, n_err62);
      checks++;
      if (n_accept == 0 || n_reject == 0 || n_glitch == 0 || n_burst == 0 || n_b2b == 0 ||
          noffs < 32 || n_stop == 0 || n_rearm == 0 || n_short1 == 0 || n_short0 == 0 ||
          n_err62 == 0) begin
        failures++; $display("a mechanism never happened");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
