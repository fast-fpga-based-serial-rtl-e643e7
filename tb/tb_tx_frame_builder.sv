// Self-checking testbench for tx_frame_builder. Random 88-sample frame
// patterns are offered, the period is changed between runs and enable is
// toggled. The testbench expects frame k at stream samples k*period ..
// k*period+87 (sample 0 = bit 0 of the first word after reset) whenever
// enable was set in the clock that word was built, with the pattern offered
// in that clock, and compares every output word and the increment pulse.
module tb_tx_frame_builder;
  localparam int W = 64, FV = 88, CYC = 400;
  logic clk = 0, rst_n = 0, enable = 0, increment;
  logic [15:0] period = 16'd100;
  logic [FV-1:0] frame_vec = '0;
  logic [W-1:0] tx_word;
  logic stream [CYC*W + 2*FV];
  int checks = 0, failures = 0, frames = 0, skipped = 0;

  tx_frame_builder #(.W(W), .FV(FV)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int per);
    longint next;
    logic exp_inc;
    rst_n = 0; period = 16'(per);
    repeat (3) @(posedge clk); #1 rst_n = 1;
    foreach (stream[i]) stream[i] = 0;
    next = 0;
    for (int c = 0; c < CYC; c++) begin
      enable = $urandom_range(0, 7) != 0;
      for (int k = 0; k < FV; k += 32) frame_vec[k +: 32] = $urandom;
      exp_inc = 0;
      if (next < (c + 1) * W) begin
        if (enable) begin
          exp_inc = 1; frames++;
          for (int s = 0; s < FV; s++) if (frame_vec[s]) stream[next + s] = 1;
        end else skipped++;
        next += per;
      end
      #1;
      checks++;
      if (increment !== exp_inc) begin failures++; $display("cycle %0d: increment %b", c, increment); end
      @(posedge clk); #1;
      checks++;
      for (int s = 0; s < W; s++)
        if (tx_word[s] !== stream[c * W + s]) begin
          failures++; $display("per %0d cycle %0d sample %0d wrong", per, c, s); break;
        end
    end
  endtask

  initial begin
    run(100);
    run(88);
    run(1000);
    run(256);
    checks++; if (frames < 100 || skipped == 0) failures++;
    $display("frames=%0d skipped=%0d", frames, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
