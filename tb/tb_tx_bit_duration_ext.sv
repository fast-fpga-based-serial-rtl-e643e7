// Self-checking testbench for tx_bit_duration_ext. For every data value,
// both distorted values and every distortion 0..7 the waveform is compared
// with a model that lists the frame's edges and moves each edge into the run
// of the shortened value (floor(D/2) at the run's start, the rest at its
// end). It also checks that the frame keeps its length: the number of ones
// changes by exactly D per run of ones.
module tb_tx_bit_duration_ext;
  localparam int SPB = 8, IB = 5, DB = 4, NB = IB + DB + 2, FV = NB * SPB;
  logic [DB-1:0] data;
  logic shorten_ones;
  logic [2:0] distortion;
  logic [FV-1:0] frame_vec;
  int checks = 0, failures = 0;

  tx_bit_duration_ext #(.SPB(SPB), .IDLE_BITS(IB), .DATA_BITS(DB)) dut (.*);

  function automatic logic [FV-1:0] model(logic [DB-1:0] d, logic v, int dd);
    logic bits[NB];
    int epos[$]; logic eval[$];
    int a = dd / 2, b = dd - a;
    logic [FV-1:0] w;
    logic cur;
    for (int k = 0; k < NB; k++) bits[k] = 0;
    bits[IB] = 1;
    for (int k = 0; k < DB; k++) bits[IB + 1 + k] = d[DB - 1 - k];
    cur = 0;
    for (int k = 0; k < NB; k++)
      if (bits[k] != cur) begin
        // edge into value bits[k] at sample k*SPB
        epos.push_back(k * SPB + ((bits[k] == v) ? a : -b));
        eval.push_back(bits[k]);
        cur = bits[k];
      end
    cur = 0;
    for (int s = 0; s < FV; s++) begin
      foreach (epos[e]) if (epos[e] == s) cur = eval[e];
      w[s] = cur;
    end
    return w;
  endfunction

  initial begin
    logic [FV-1:0] exp_w;
    int ones0, runs1;
    for (int d = 0; d < 16; d++)
      for (int v = 0; v < 2; v++)
        for (int dd = 0; dd < 8; dd++) begin
          data = 4'(d); shorten_ones = 1'(v); distortion = 3'(dd);
          #1;
          exp_w = model(4'(d), 1'(v), dd);
          checks++;
          if (frame_vec !== exp_w) begin
            failures++;
            $display("d=%h v=%0d D=%0d: got %b expected %b", d, v, dd, frame_vec, exp_w);
          end
          // ones count: nominal ones -/+ D per run of ones
          ones0 = 1 + $countones(4'(d)); runs1 = 0;
          for (int k = 0; k <= DB; k++) if (((k == 0) ? 1'b1 : data[DB - k]) &&
                                            (k == DB || !data[DB - 1 - k])) runs1++;
          checks++;
          if ($countones(frame_vec) != ones0 * SPB + (v ? -dd : dd) * runs1) begin
            failures++; $display("d=%h v=%0d D=%0d: %0d ones", d, v, dd, $countones(frame_vec));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
