// tb_tff: drives random levels into the T flip-flop and compares q with a
// reference that counts the input's rising edges modulo 2, one cycle later.
module tb_tff;
  logic clk = 0, rst_n = 0, t = 0, q, rose;
  int checks = 0, failures = 0;
  bit ref_q = 0, ref_rose = 0, t_prev = 0;

  tff dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (q !== 1'b0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 1000; i++) begin
      t = ($urandom_range(0, 2) != 0) ? ~t : t;
      @(posedge clk);
      ref_rose = t & ~t_prev;
      if (ref_rose) ref_q = ~ref_q;
      t_prev = t;
      @(negedge clk);
      checks++;
      if (q !== ref_q || rose !== ref_rose) begin
        failures++; $display("FAIL i=%0d q=%b ref=%b rose=%b", i, q, ref_q, rose);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
