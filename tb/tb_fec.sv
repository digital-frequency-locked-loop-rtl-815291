// tb_fec: random adder values, m and n; checks that one cycle after `xfer` the
// FEC issues `load` with delta = Q - X folded into (-P/2, P/2], P = m*K + n,
// that `clr` follows `xfer` in the same cycle, and that no load appears
// without a transfer.
module tb_fec;
  import dfll_pkg::*;
  localparam int K = 7, XC = 20, X = K * XC;
  logic clk = 0, rst_n = 0, xfer = 0, clr, load;
  logic signed [QW-1:0] q = '0, delta;
  logic [MW-1:0] m = 8'd75;
  logic [$clog2(K)-1:0] n = '0;
  int checks = 0, failures = 0, c_fold = 0, c_plain = 0;

  fec #(.K(K), .XC(XC)) dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, p, exp_d;
    automatic bit prev_xfer = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      m    = MW'($urandom_range(50, 100));
      n    = 3'($urandom_range(0, K - 1));
      q    = QW'(X + int'($urandom_range(0, 1600)) - 800);
      xfer = ($urandom_range(0, 2) == 0);
      p = int'(m) * K + int'(n);
      e = int'(q) - X;
      exp_d = e;
      if (2 * e > p)  exp_d = e - p;
      else if (2 * e < -p) exp_d = e + p;
      #0.1;
      checks++;
      if (clr !== xfer) begin failures++; $display("FAIL clr"); end
      prev_xfer = xfer;
      @(negedge clk);
      checks++;
      if (load !== prev_xfer) begin failures++; $display("FAIL i=%0d load=%b", i, load); end
      if (prev_xfer) begin
        checks++;
        if (int'(delta) != exp_d) begin
          failures++; $display("FAIL i=%0d Q=%0d P=%0d delta=%0d exp=%0d", i, q, p, delta, exp_d);
        end
        if (exp_d != e) c_fold++; else c_plain++;
      end
    end
    checks++; if (c_fold == 0 || c_plain == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
