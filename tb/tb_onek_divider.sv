// tb_onek_divider: drives the 1+1/k divider from a K-phase edge model with a
// random divide request at each output edge, and checks that the next output
// edge follows K+1 cycles later when dividing and K cycles later when not,
// that every output edge is an edge of the selected phase, and that the
// selection moves to the next phase exactly when dividing.
module tb_onek_divider;
  localparam int K = 7;
  logic clk = 0, rst_n = 0, div = 0, pulse, clk_out;
  logic [K-1:0] rise, phase, sel;
  logic [$clog2(K)-1:0] ph;
  int checks = 0, failures = 0, c_div = 0, c_pass = 0;

  mp_clock_gen #(.K(K)) u_mp (.clk, .rst_n, .ph, .rise, .phase);
  onek_divider #(.K(K)) dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int last = -1, t = 0, expect_len = 0, exp_sel_idx = 0, sel_idx;
    automatic bit div_at_last = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (t = 0; t < 20000; t++) begin
      if (t % 3 == 0) div = 1'($urandom_range(0, 1));
      #0.1;
      if (pulse) begin
        sel_idx = $clog2(sel);
        checks++;
        if (!$onehot(sel) || !(|(rise & sel)) || sel_idx != exp_sel_idx) begin
          failures++; $display("FAIL t=%0d edge not of the selected phase", t);
        end
        if (last >= 0) begin
          expect_len = div_at_last ? K + 1 : K;
          checks++;
          if (t - last != expect_len) begin
            failures++; $display("FAIL t=%0d interval %0d expected %0d", t, t - last, expect_len);
          end
          if (div_at_last) c_div++; else c_pass++;
        end
        last = t;
        div_at_last = div;
        if (div) exp_sel_idx = (exp_sel_idx + 1) % K;
      end
      @(negedge clk);
    end
    checks++; if (c_div == 0 || c_pass == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
