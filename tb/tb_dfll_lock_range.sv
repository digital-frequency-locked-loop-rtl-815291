// tb_dfll_lock_range: sweeps the input frequency of the DFLL (default
// parameters: f_mp = 2 MHz, K = 7, m in 50..100) across its whole lock-in
// range, 40 kHz down to 19.83 kHz and back, in steps of about 25 phase
// differences (plus fractional periods), without reset. At every step it checks
// that the loop is locked: each of 12 output periods lies within one phase
// difference of the input period (input periods themselves vary by one cycle
// when fractional), and the mean within one phase difference. It also checks the
// two ends of the range: m = 50, n = 0 at 40 kHz and m = 100, n = 6 at 19.83 kHz.
module tb_dfll_lock_range;
  import dfll_pkg::*;
  localparam int K = 7;

  logic clk = 0, rst_n = 0, fin = 0;
  logic fout, clk_1k, dc1, exor, lead, lag, xfer, carry, borrow, period_start;
  logic [K-1:0] mp_clk;
  meas_state_e state;
  logic signed [QW-1:0] q;
  logic [MW-1:0] m;
  logic [$clog2(K)-1:0] n;

  dfll_top dut (.*);
  always #1 clk = ~clk;

  int checks = 0, failures = 0, steps = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (6_000_000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input: period per_num/10 cycles
  int per_num = 3500;
  longint acc = 0;
  int since = 0, cur_len = 350;
  always @(posedge clk) begin
    if (since + 1 >= cur_len) begin
      since   <= 0;
      acc     <= acc + longint'(per_num);
      cur_len <= int'((acc + longint'(per_num)) / 10) - int'(acc / 10);
      fin     <= 1'b1;
    end else begin
      since <= since + 1;
      if (since + 1 == cur_len / 2) fin <= 1'b0;
    end
  end

  logic fout_d = 0;
  longint last_rise = 0;
  int tout_last = 0, n_out = 0;
  always @(posedge clk) begin
    fout_d <= fout;
    if (fout && !fout_d) begin
      tout_last <= int'(cycle - last_rise);
      last_rise <= cycle;
      n_out     <= n_out + 1;
    end
  end

  task automatic step(int num);
    longint sum = 0;
    int cnt = 0, worst = 0, r, start_n, seen;
    per_num = num;
    repeat (12 * num / 10) @(negedge clk);
    start_n = n_out; seen = start_n;
    while (n_out < start_n + 12) begin
      @(negedge clk);
      if (n_out != seen) begin
        seen = n_out;
        sum += longint'(tout_last); cnt++;
        r = tout_last * 10 - num; if (r < 0) r = -r;
        if (r > worst) worst = r;
      end
    end
    steps++;
    checks++;
    if (worst > 20) begin
      failures++; $display("FAIL T_in=%0d/10: worst period error %0d/10", num, worst);
    end
    checks++;
    r = int'(sum * 10 - longint'(num) * cnt); if (r < 0) r = -r;
    if (r > cnt * 10) begin
      failures++; $display("FAIL T_in=%0d/10: mean %0d/%0d", num, sum, cnt);
    end
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    step(3500);
    checks++; if (m != 8'd50 || n != 0) begin failures++; $display("FAIL upper end m=%0d n=%0d", m, n); end
    for (int p = 3750; p <= 7000; p += 253) step(p);
    step(7060);
    checks++; if (m != 8'd100 || n != 6) begin failures++; $display("FAIL lower end m=%0d n=%0d", m, n); end
    for (int p = 6810; p >= 3500; p -= 247) step(p);
    step(3500);
    checks++; if (m != 8'd50 || n != 0) begin failures++; $display("FAIL upper end again m=%0d n=%0d", m, n); end
    $display("%0d frequency steps", steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
