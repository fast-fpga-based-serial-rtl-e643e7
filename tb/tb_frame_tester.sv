// Self-checking testbench for frame_tester. With no distortion and a period
// of 256 samples, frame k must start at stream sample 256*k and carry the
// counter value k mod 16 (first data bit = MSB): the testbench reads every
// bit at its centre sample from the output words. With distortion 4 on the
// ones, the lone start bit of frame 0 (data 0) must be 4 samples long.
// The count output must advance once per frame while enabled, and not at all
// while enable is low.
module tb_frame_tester;
  localparam int W = 64, P = 256, CYC = 200;
  logic clk = 0, rst_n = 0, enable = 0, shorten_ones = 0;
  logic [2:0] distortion = '0;
  logic [15:0] period = 16'(P);
  logic [W-1:0] tx_word;
  logic [3:0] count;
  logic stream [CYC*W];
  int checks = 0, failures = 0;

  frame_tester #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic capture();
    rst_n = 0; repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int c = 0; c < CYC; c++) begin
      @(posedge clk); #1;
      for (int s = 0; s < W; s++) stream[c*W + s] = tx_word[s];
    end
  endtask

  initial begin
    int nframes, ones;
    logic [3:0] d;
    enable = 1;
    capture();
    nframes = CYC * W / P - 1;
    for (int k = 0; k < nframes; k++) begin
      for (int b = 0; b < 10; b++) begin
        d = 4'(k);
        checks++;
        if (stream[k*P + b*8 + 4] !== ((b < 5) ? 1'b0 : (b == 5) ? 1'b1 : d[9 - b])) begin
          failures++; $display("frame %0d bit %0d wrong", k, b);
        end
      end
      checks++;
      for (int s = 80; s < P; s++) if (stream[k*P + s] !== 1'b0) begin failures++; break; end
    end
    checks++; if (count != 4'((CYC * W + P - 1) / P)) begin failures++; $display("count %0d", count); end
    // distortion: shorten ones by 4 samples
    shorten_ones = 1; distortion = 3'd4;
    capture();
    ones = 0;
    for (int s = 0; s < 80; s++) ones += stream[s];
    checks++; if (ones != 4 || stream[42] !== 1'b1 || stream[45] !== 1'b1 || stream[41] !== 1'b0) failures++;
    // enable low: nothing sent, counter holds
    enable = 0;
    capture();
    checks++; if (count != 0) failures++;
    checks++; for (int s = 0; s < CYC*W; s++) if (stream[s]) begin failures++; break; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
