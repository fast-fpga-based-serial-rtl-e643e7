// Workload testbench: the dynamic data test on serial_rx_top at default
// parameters. The tester sends counter frames every 1000 samples (3.2 MHz
// frame rate at 3.2 GS/s), looped straight back into the receiver, with
// logical 1 or logical 0 runs shortened by 0, 2, 3, 4 and 5 of the 8 samples
// of a bit (0 %, 25 %, 37.5 %, 50 %, 62.5 %). NF frames per setting are
// classified as correct, wrong data, rejected or missed (no output at the
// expected clock, 5 clocks after the tester word holding the start bit) and
// printed as an error table. Up to 37.5 % every frame must be correct;
// at 62.5 % errors must occur.
module tb_serial_rx_dynamic;
  localparam int W = 64, P = 1000, LAT = 5, NF = 2000;
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
  int checks = 0, failures = 0, e62 = 0;

  serial_rx_top dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input bit ones, input int dd, output int wrong, output int rej, output int miss);
    int a, b, shift, k, ncyc, st;
    int ev [int];
    a = dd / 2; b = dd - a; shift = ones ? a : -b;
    for (k = 0; k < NF; k++) begin
      st = k * P + 40 + shift;
      ev[st / W + LAT] = k;
    end
    wrong = 0; rej = 0; miss = 0;
    tx_shorten_ones = ones; tx_distortion = 3'(dd);
    rst_n = 0; rx_word = '0; repeat (3) @(posedge clk); #1 rst_n = 1;
    ncyc = (NF * P) / W + LAT + 1;
    for (int c = 0; c < ncyc; c++) begin
      @(posedge clk); #1;
      rx_word = tx_word;
      if (ev.exists(c)) begin
        if (rx_frame_valid && rx_frame_data != 4'(ev[c])) wrong++;
        else if (rx_frame_reject) rej++;
        else if (!rx_frame_valid) miss++;
      end
    end
  endtask

  initial begin
    int wrong, rej, miss;
    $display("shortened  samples  frames  wrong  rejected  missed  error %%");
    for (int v = 1; v >= 0; v--)
      for (int dd = 0; dd <= 5; dd++) begin
        if (dd == 1) continue;
        run(1'(v), dd, wrong, rej, miss);
        $display("bit \"%0d\"   %0d of 8   %0d    %0d    %0d    %0d    %0.1f", v, dd, NF, wrong, rej,
                 miss, 100.0 * (wrong + rej + miss) / NF);
        checks++;
        if (dd <= 3 && wrong + rej + miss != 0) begin failures++; $display("errors at %0d", dd); end
        if (dd == 5) e62 = e62 + wrong + rej + miss;
      end
    checks++; if (e62 == 0) begin failures++; $display("no errors at 62.5 %%"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
