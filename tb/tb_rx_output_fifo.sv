// Self-checking testbench for rx_output_fifo at depth 16: random writes and
// reads compared with a queue kept here, the capture stop when the FIFO
// fills (later writes dropped even after reads), re-arming, and the
// one-clock read latency.
module tb_rx_output_fifo;
  localparam int WD = 8, D = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, capture_rearm = 0;
  logic [WD-1:0] wr_data = '0, rd_data;
  logic rd_valid, empty, full, stopped;
  logic [$clog2(D):0] count;
  logic [WD-1:0] q[$];
  logic exp_valid = 0;
  logic [WD-1:0] exp_data = '0;
  logic model_stopped = 0;
  int checks = 0, failures = 0, stops = 0;

  rx_output_fifo #(.WIDTH(WD), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(input logic w, input logic r, input logic rearm);
    wr_en = w; rd_en = r; capture_rearm = rearm; wr_data = WD'($urandom);
    // model, evaluated against the state before the clock edge
    exp_valid = r && q.size() > 0;
    if (exp_valid) exp_data = q[0];
    if (w && !model_stopped && q.size() < D) q.push_back(wr_data);
    if (exp_valid) void'(q.pop_front());
    if (rearm) model_stopped = 0;
    else if (q.size() == D) begin
      if (!model_stopped) stops++;
      model_stopped = 1;
    end
    @(posedge clk); #1;
    checks++;
    if (rd_valid !== exp_valid || (exp_valid && rd_data !== exp_data) ||
        count != q.size() || empty !== (q.size() == 0) || full !== (q.size() == D) ||
        stopped !== model_stopped) begin
      failures++;
      $display("t=%0t: valid=%b data=%h count=%0d stopped=%b; expected %b %h %0d %b", $time,
               rd_valid, rd_data, count, stopped, exp_valid, exp_data, q.size(), model_stopped);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      step($urandom_range(0, 99) < 60, $urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 30),
           $urandom_range(0, 99) < 2);
    end
    // fill completely, then check that reads do not restart the capture
    for (int i = 0; i < 2 * D; i++) step(1, 0, 0);
    for (int i = 0; i < 4; i++) step(1, 1, 0);
    checks++; if (!stopped || count != D - 4) failures++;
    step(1, 0, 1);
    step(1, 0, 0);
    checks++; if (count != D - 3) failures++;
    checks++; if (stops < 3) failures++;
    $display("stops=%0d", stops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
