// tb_ud_counter_m: random carry/borrow streams against a reference that counts
// by one and stays inside [M_MIN, M_MAX]; checks the at_max/at_min flags and
// that both limits are reached.
module tb_ud_counter_m;
  import dfll_pkg::*;
  localparam int M_MIN = 50, M_MAX = 100, M_INIT = 75;
  logic clk = 0, rst_n = 0, carry = 0, borrow = 0, at_max, at_min;
  logic [MW-1:0] m;
  int checks = 0, failures = 0, ref_m = M_INIT, hit_max = 0, hit_min = 0;

  ud_counter_m #(.M_MIN(M_MIN), .M_MAX(M_MAX), .M_INIT(M_INIT)) dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (int'(m) != M_INIT) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 4000; i++) begin
      automatic int r = $urandom_range(0, 99);
      automatic bit upward = (i / 500) % 2 == 0;
      carry  = upward ? (r < 70) : (r < 10);
      borrow = !carry && (upward ? (r < 90) : (r < 80));
      @(posedge clk);
      if (carry && ref_m < M_MAX)       ref_m++;
      else if (borrow && ref_m > M_MIN) ref_m--;
      @(negedge clk);
      checks++;
      if (int'(m) != ref_m || at_max !== (ref_m == M_MAX) || at_min !== (ref_m == M_MIN)) begin
        failures++; $display("FAIL i=%0d m=%0d ref=%0d", i, m, ref_m);
        ref_m = int'(m);
      end
      if (ref_m == M_MAX) hit_max++;
      if (ref_m == M_MIN) hit_min++;
    end
    checks++; if (hit_max == 0 || hit_min == 0) begin failures++; $display("FAIL limits not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
