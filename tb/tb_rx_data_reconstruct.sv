// Self-checking testbench for rx_data_reconstruct. For random offsets and
// random data it draws a frame into the filtered vector with every bit
// boundary moved by up to +-2 samples (runs of at least 4 samples), and checks
// that the data come out correct, one clock after trig. Then it checks the
// rejections: a data bit whose window only holds alternating pairs of samples
// (no three equal samples), a start bit that reads as 0, and no output
// without trig. A second instance set for 8.5 samples per bit must read
// frames drawn at that ratio, and the 8-sample instance must still read
// frames arriving at 8.5 samples per bit (a rough ratio).
module tb_rx_data_reconstruct;
  localparam int W = 64, N = 188, BASE = 62, SPB = 8, DB = 4;
  logic clk = 0, rst_n = 0;
  logic trig = 0;
  logic [5:0] offset = '0;
  logic [N-1:0] vec = '0;
  logic frame_valid, frame_reject;
  logic [DB-1:0] data;
  int checks = 0, failures = 0, accepted = 0, rejected = 0;

  rx_data_reconstruct #(.N(N), .W(W), .SEARCH_BASE(BASE), .SPB_X16(SPB*16), .DATA_BITS(DB)) dut (.*);

  // A second instance set for 8.5 samples per bit (SPB_X16 = 136).
  logic f_valid, f_reject;
  logic [DB-1:0] f_data;
  rx_data_reconstruct #(.N(N), .W(W), .SEARCH_BASE(BASE), .SPB_X16(136), .DATA_BITS(DB)) dut_frac (
    .clk, .rst_n, .trig, .offset, .vec, .frame_valid(f_valid), .frame_reject(f_reject), .data(f_data));

  // frame drawn at x16 samples per bit, bit k from round(k*x16/16)
  function automatic logic [N-1:0] draw_ratio(int p, logic [DB-1:0] d, int x16);
    logic [N-1:0] v = '0;
    for (int k = 0; k <= DB; k++)
      for (int s = p + (k * x16 + 8) / 16; s < p + ((k + 1) * x16 + 8) / 16; s++)
        v[s] = (k == 0) ? 1'b1 : d[DB - k];
    return v;
  endfunction

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // frame bits: [0] start bit, [1..DB] data, first data bit = MSB
  function automatic logic [N-1:0] draw(int p, logic [DB-1:0] d, int jit[DB+2]);
    logic [N-1:0] v = '0;
    logic b;
    int s0, s1;
    for (int k = 0; k <= DB; k++) begin
      b  = (k == 0) ? 1'b1 : d[DB - k];
      s0 = p + k * SPB + ((k == 0) ? 0 : jit[k]);
      s1 = p + (k + 1) * SPB + jit[k + 1];
      for (int s = s0; s < s1; s++) v[s] = b;
    end
    return v;
  endfunction

  task automatic apply(input logic [N-1:0] v, input int off, input logic t,
                       input logic exp_valid, input logic [DB-1:0] exp_data);
    vec = v; offset = 6'(off); trig = t;
    @(posedge clk); #1;
    checks++;
    if (frame_valid !== exp_valid || frame_reject !== (t && !exp_valid) ||
        (exp_valid && data !== exp_data)) begin
      failures++;
      $display("off=%0d: valid=%b reject=%b data=%h, expected valid=%b data=%h",
               off, frame_valid, frame_reject, data, exp_valid, exp_data);
    end
    if (frame_valid) accepted++;
    if (frame_reject) rejected++;
  endtask

  initial begin
    int jit[DB+2];
    int off;
    logic [DB-1:0] d;
    logic [N-1:0] v;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int r = 0; r < 400; r++) begin
      off = $urandom_range(0, W - 1);
      d = DB'($urandom);
      jit[0] = 0;
      for (int k = 1; k < DB + 2; k++) jit[k] = (r < 40) ? 0 : int'($urandom_range(0, 4)) - 2;
      jit[DB+1] = (jit[DB+1] < 0) ? 0 : jit[DB+1];
      apply(draw(BASE + off, d, jit), off, 1'b1, 1'b1, d);
    end
    // no trig: no output
    apply(draw(BASE + 5, 4'hA, '{0,0,0,0,0,0}), 5, 1'b0, 1'b0, '0);
    // bit 2 window filled with 0110 0110: no sampling point
    for (int r = 0; r < 20; r++) begin
      off = $urandom_range(0, W - 1);
      v = draw(BASE + off, 4'b1111, '{0,0,0,0,0,0});
      for (int s = 0; s < SPB; s++) v[BASE + off + 2*SPB + s] = (s % 4 == 1) || (s % 4 == 2);
      apply(v, off, 1'b1, 1'b0, '0);
    end
    // start bit reads as 0
    apply('0, 10, 1'b1, 1'b0, '0);
    // fractional ratio: 8.5 samples per bit read by the 8.5 instance, and a
    // line 6 % slower than the nominal 8 samples per bit read by the first
    for (int r = 0; r < 100; r++) begin
      off = $urandom_range(0, W - 1);
      d = DB'($urandom);
      vec = draw_ratio(BASE + off, d, 136); offset = 6'(off); trig = 1;
      @(posedge clk); #1;
      checks++;
      if (!f_valid || f_data !== d) begin
        failures++; $display("8.5 samples/bit: valid=%b data=%h expected %h", f_valid, f_data, d);
      end
      apply(draw_ratio(BASE + off, d, 136), off, 1'b1, 1'b1, d);
    end
    checks++; if (accepted != 500 || rejected != 21) failures++;
    $display("accepted=%0d rejected=%0d", accepted, rejected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
