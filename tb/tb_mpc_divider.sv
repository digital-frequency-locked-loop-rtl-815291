// tb_mpc_divider: sets random division ratios m + n/K and checks that every
// output period lasts m*K + n cycles (phase differences), that DC1 is low for
// exactly the first n of the m edges of a period, and that a new ratio takes
// effect from the start of the next period. `hold` keeps the old ratio.
module tb_mpc_divider;
  import dfll_pkg::*;
  localparam int K = 7;
  logic clk = 0, rst_n = 0, hold = 0, fout, dc1, clk_1k, start;
  logic [K-1:0] rise, phase;
  logic [MW-1:0] m = 8'd75;
  logic [$clog2(K)-1:0] n = '0;
  int checks = 0, failures = 0, c_hold = 0;

  mp_clock_gen #(.K(K)) u_mp (.clk, .rst_n, .ph(), .rise, .phase);
  mpc_divider #(.K(K)) dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure periods between output rising edges and DC1-low edge counts
  logic fout_d = 0;
  int t = 0, last_rise = -1, div_edges = 0;
  int exp_len = 0, exp_n = 0, nxt_len, nxt_n;
  always @(negedge clk) begin
    if (rst_n) begin
      if (fout && !fout_d) begin
        if (last_rise >= 0) begin
          checks++;
          if (t - last_rise != exp_len) begin
            failures++; $display("FAIL t=%0d period %0d expected %0d", t, t - last_rise, exp_len);
          end
          checks++;
          if (div_edges != exp_n) begin
            failures++; $display("FAIL t=%0d %0d divided edges, expected %0d", t, div_edges, exp_n);
          end
        end
        last_rise = t;
        div_edges = 0;
        exp_len = nxt_len;
        exp_n   = nxt_n;
      end
      fout_d <= fout;
      t++;
    end
  end
  // count 1+1/k edges taken while DC1 low (sampled as the edge is taken)
  always @(posedge clk) if (rst_n && dut.pulse && !dut.dc1) div_edges <= div_edges + 1;

  initial begin
    int mm, nn;
    nxt_len = 75 * K; nxt_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      // change the ratio right after a period has started
      @(posedge start);
      @(negedge clk);
      mm = $urandom_range(50, 100);
      nn = $urandom_range(0, K - 1);
      if (i % 10 == 5) begin
        hold = 1; c_hold++;     // held: the old ratio stays for the next period
      end else begin
        hold = 0;
        nxt_len = mm * K + nn;
        nxt_n   = nn;
      end
      m = MW'(mm);
      n = 3'(nn);
      if (hold) begin @(posedge start); @(negedge clk); hold = 0; nxt_len = mm * K + nn; nxt_n = nn; end
    end
    repeat (3) @(posedge start);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
