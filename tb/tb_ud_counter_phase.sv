// tb_ud_counter_phase: random enable/up/down/clear sequences against a
// reference counter that starts at XC, counts only when enabled and returns to
// XC on clear.
module tb_ud_counter_phase;
  import dfll_pkg::*;
  localparam int XC = 20;
  logic clk = 0, rst_n = 0, en = 0, up = 0, dn = 0, clr = 0;
  logic signed [CW-1:0] cnt;
  int checks = 0, failures = 0, ref_cnt = XC;

  ud_counter_phase #(.XC(XC)) dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (int'(cnt) != XC) begin failures++; $display("FAIL reset value %0d", cnt); end
    for (int i = 0; i < 3000; i++) begin
      automatic int r = $urandom_range(0, 99);
      en  = 1'($urandom_range(0, 1));
      // long runs in one direction so the count goes well below zero too
      up  = (i / 200) % 2 == 0 ? (r < 45) : (r < 5);
      dn  = !up && ((i / 200) % 2 == 0 ? (r < 55) : (r < 95));
      clr = (r == 99);
      @(posedge clk);
      if (clr)           ref_cnt = XC;
      else if (en && up) ref_cnt++;
      else if (en && dn) ref_cnt--;
      @(negedge clk);
      checks++;
      if (int'(cnt) != ref_cnt) begin
        failures++; $display("FAIL i=%0d cnt=%0d ref=%0d", i, cnt, ref_cnt);
        ref_cnt = int'(cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
