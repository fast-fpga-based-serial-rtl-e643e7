// Self-checking testbench for rx_start_detect. Vectors hold an idle run of
// zeros followed by a one at a chosen position, sometimes with one zero too
// few, sometimes with a second, later pattern, and sometimes random noise.
// The expected trigger and offset come from a plain search over the vector
// done here; the result must appear one clock later with the vector copy.
module tb_rx_start_detect;
  localparam int W = 64, N = 188, Z = 32, BASE = 62;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] vec_in = '0, vec_out;
  logic trig;
  logic [5:0] offset;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  rx_start_detect #(.N(N), .W(W), .START_ZEROS(Z), .SEARCH_BASE(BASE)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input logic [N-1:0] v);
    logic exp_hit; int exp_off; bit ok;
    exp_hit = 0; exp_off = 0;
    for (int o = 0; o < W && !exp_hit; o++) begin
      ok = v[BASE + o];
      for (int t = 1; t <= Z; t++) if (v[BASE + o - t]) ok = 0;
      if (ok) begin exp_hit = 1; exp_off = o; end
    end
    vec_in = v;
    @(posedge clk); #1;
    checks++;
    if (trig !== exp_hit || (exp_hit && offset != exp_off) || vec_out !== v) begin
      failures++;
      $display("got trig=%b off=%0d, expected %b %0d", trig, offset, exp_hit, exp_off);
    end
    if (exp_hit) hits++; else misses++;
  endtask

  initial begin
    logic [N-1:0] v;
    int p, zeros;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int r = 0; r < 600; r++) begin
      for (int k = 0; k < N; k += 32) v[k +: 32] = $urandom;
      p = BASE + int'($urandom_range(0, W - 1));
      zeros = (r % 5 == 0) ? Z - 1 : Z;
      for (int t = 1; t <= zeros; t++) v[p - t] = 1'b0;
      v[p] = 1'b1;
      if (r % 5 == 0) v[p - zeros - 1] = 1'b1;        // one zero too few
      if (r % 7 == 0 && p + Z + 1 < BASE + W) begin  // a second, later pattern
        for (int t = 1; t <= Z; t++) v[p + 1 + t - 1] = 1'b0;
        v[p + Z + 1] = 1'b1;
      end
      run(v);
    end
    run('0);
    checks++; if (hits < 100 || misses < 50) failures++;
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
