// tb_freq_comparator: drives pairs of input/output edges with known spacing
// and checks the adder value at the transfer strobe. With gap = (output edge
// time - input edge time) of the first and of the second EX-OR pulse, in clk
// cycles (= phase differences), Q must equal X + gap1 - gap2, X = K*XC. Pulses
// opened by the input and by the output are both used, and the counters are
// cleared at every transfer as the FEC does.
module tb_freq_comparator;
  import dfll_pkg::*;
  localparam int K = 7, XC = 20, X = K * XC;
  logic clk = 0, rst_n = 0, fin = 0, fout = 0, clr, xfer, lead, lag, exor;
  logic [K-1:0] rise = 1;
  logic signed [QW-1:0] q;
  meas_state_e state;
  int checks = 0, failures = 0, n_xfer = 0;
  int exp_q;
  bit out_first_seen = 0, in_first_seen = 0;

  assign clr = xfer;
  freq_comparator #(.K(K), .XC(XC)) dut (.*);
  always #1 clk = ~clk;
  always @(posedge clk) rise <= {rise[K-2:0], rise[K-1]};

  always @(negedge clk) if (xfer) begin
    n_xfer++;
    checks++;
    if (int'(q) != exp_q) begin
      failures++; $display("FAIL Q=%0d expected %0d", q, exp_q);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one EX-OR pulse: an edge of the leading signal, `g` cycles, an edge of the
  // other; both signals return low afterwards. Returns the signed gap.
  task automatic pulse(int g, bit out_first, output int gap);
    @(negedge clk);
    if (out_first) fout = 1; else fin = 1;
    repeat (g) @(negedge clk);
    if (out_first) fin = 1; else fout = 1;
    repeat (3) @(negedge clk);
    fin = 0; fout = 0;
    repeat (2 + $urandom_range(0, 20)) @(negedge clk);
    gap = out_first ? -g : g;
  endtask

  initial begin
    automatic int g1, g2, gap, expected_xfers = 0;
    bit o1, o2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      o1 = ($urandom_range(0, 3) == 0);
      o2 = ($urandom_range(0, 3) == 0);
      if (o1 || o2) out_first_seen = 1;
      if (!o1 || !o2) in_first_seen = 1;
      g1 = $urandom_range(1, 120);
      g2 = $urandom_range(1, 120);
      exp_q = X + (o1 ? -g1 : g1) - (o2 ? -g2 : g2);
      pulse(g1, o1, gap);
      pulse(g2, o2, gap);
      expected_xfers++;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (n_xfer != expected_xfers) begin
      failures++; $display("FAIL %0d transfers, expected %0d", n_xfer, expected_xfers);
    end
    checks++;
    if (!out_first_seen || !in_first_seen) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
