// Self-checking testbench for rx_majority_filter: random vectors, and
// vectors with isolated pulses of 1 to 4 samples, are filtered and each
// output sample is compared with a count of ones among the five input samples
// centred on it, one clock later. It also checks that 1- and 2-sample pulses
// vanish and longer ones keep their width.
module tb_rx_majority_filter;
  localparam int N = 192, M = N - 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_vec = '0;
  logic [M-1:0] out_vec;
  int checks = 0, failures = 0;

  rx_majority_filter #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_vec(input logic [N-1:0] v);
    int ones;
    in_vec = v;
    @(posedge clk); #1;
    for (int j = 0; j < M; j++) begin
      ones = 0;
      for (int t = j; t < j + 5; t++) ones += v[t];
      checks++;
      if (out_vec[j] !== (ones > 2)) begin
        failures++;
        $display("sample %0d: got %b, %0d ones", j, out_vec[j], ones);
      end
    end
  endtask

  initial begin
    logic [N-1:0] v;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int r = 0; r < 100; r++) begin
      for (int k = 0; k < N; k += 32) v[k +: 32] = $urandom;
      check_vec(v);
    end
    // isolated pulses: width w at position 100
    for (int w = 1; w <= 4; w++) begin
      v = '0;
      for (int k = 0; k < w; k++) v[100 + k] = 1'b1;
      check_vec(v);
      checks++;
      if ($countones(out_vec) != ((w < 3) ? 0 : w)) begin
        failures++; $display("pulse of %0d samples left %0d ones", w, $countones(out_vec));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
