// tb_ud_counter_n: loads random errors into U/D-counter_n together with a
// model of U/D-counter_m, and checks after settling that m*K + n moved by
// exactly the error (clamped at the m limits), that n ends in 0..K-1, and that
// the settling took one cycle per K-step, as the flow chart loops once per
// step.
module tb_ud_counter_n;
  import dfll_pkg::*;
  localparam int K = 7, XC = 20, M_MIN = 50, M_MAX = 100;
  logic clk = 0, rst_n = 0, load = 0, carry, borrow, busy;
  logic signed [QW-1:0] delta = '0;
  logic [$clog2(K)-1:0] n;
  int m = 75;
  logic m_at_max, m_at_min;
  int checks = 0, failures = 0;
  int c_carry = 0, c_borrow = 0, c_clamp = 0;

  assign m_at_max = (m >= M_MAX);
  assign m_at_min = (m <= M_MIN);

  ud_counter_n #(.K(K), .XC(XC)) dut (.*);
  always #1 clk = ~clk;

  always @(posedge clk) begin
    if (carry)  begin m <= m + 1; c_carry++;  end
    if (borrow) begin m <= m - 1; c_borrow++; end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ratio, target, steps, d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (n !== '0 || busy) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 2000; i++) begin
      ratio  = m * K + int'(n);
      d      = (i % 50 == 49) ? (($urandom_range(0, 1) != 0) ? 400 : -400)
                              : int'($urandom_range(0, 160)) - 80;
      target = ratio + d;
      if (target > M_MAX * K + K - 1) begin target = M_MAX * K + K - 1; c_clamp++; end
      if (target < M_MIN * K)         begin target = M_MIN * K;         c_clamp++; end
      delta = QW'(d);
      load  = 1;
      @(negedge clk);
      load  = 0;
      steps = 0;
      while (busy && steps < 1000) begin @(negedge clk); steps++; end
      checks++;
      if (m * K + int'(n) != target) begin
        failures++; $display("FAIL i=%0d d=%0d m=%0d n=%0d target=%0d", i, d, m, n, target);
      end
      // one K-step per cycle: settling takes at most |d|/K + 1 cycles
      checks++;
      if (steps > (d < 0 ? -d : d) / K + 1) begin
        failures++; $display("FAIL i=%0d d=%0d took %0d cycles", i, d, steps);
      end
    end
    checks++; if (c_carry == 0 || c_borrow == 0 || c_clamp == 0) begin
      failures++; $display("FAIL carry=%0d borrow=%0d clamp=%0d", c_carry, c_borrow, c_clamp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
