// Self-checking testbench for tx_up_counter: random enable and increment,
// counter compared with a model value, including the wrap from 15 to 0.
module tb_tx_up_counter;
  logic clk = 0, rst_n = 0, enable = 0, increment = 0;
  logic [3:0] count;
  int model = 0, checks = 0, failures = 0, wraps = 0;

  tx_up_counter #(.WIDTH(4)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    checks++; if (count !== 4'd0) failures++;
    for (int i = 0; i < 500; i++) begin
      enable = $urandom_range(0, 3) != 0;
      increment = $urandom_range(0, 1);
      @(posedge clk); #1;
      if (enable && increment) begin
        model = (model + 1) % 16;
        if (model == 0) wraps++;
      end
      checks++;
      if (count !== 4'(model)) begin failures++; $display("got %0d expected %0d", count, model); end
    end
    checks++; if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
