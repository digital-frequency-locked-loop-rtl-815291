// tb_mp_clock_gen: checks the K-phase clock generator against a reference
// model: phase i rises exactly when the cycle count since reset is i mod K, its
// waveform is high for (K+1)/2 of every K cycles, and `rise` is one-hot.
module tb_mp_clock_gen;
  localparam int K = 7;
  logic clk = 0, rst_n = 0;
  logic [$clog2(K)-1:0] ph;
  logic [K-1:0] rise, phase, phase_d;
  int checks = 0, failures = 0;

  mp_clock_gen #(.K(K)) dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    repeat (2) @(negedge clk);
    rst_n = 1;
    phase_d = phase;
    for (t = 0; t < 10 * K; t++) begin
      for (int i = 0; i < K; i++) begin
        automatic int d = ((t - i) % K + K) % K;
        checks++;
        if (rise[i] !== (d == 0)) begin
          failures++; $display("FAIL t=%0d rise[%0d]=%b", t, i, rise[i]);
        end
        checks++;
        if (phase[i] !== (d < (K + 1) / 2)) begin
          failures++; $display("FAIL t=%0d phase[%0d]=%b", t, i, phase[i]);
        end
        // a rising waveform edge only where rise says so
        if (t > 0) begin
          checks++;
          if ((phase[i] && !phase_d[i]) !== rise[i]) begin
            failures++; $display("FAIL t=%0d edge of phase %0d", t, i);
          end
        end
      end
      checks++;
      if (!$onehot(rise)) begin failures++; $display("FAIL rise not one-hot"); end
      phase_d = phase;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
