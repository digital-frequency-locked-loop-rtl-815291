// tb_dfll_top: end-to-end test of the DFLL at its default parameters
// (K = 7, m in 50..100, f_mp = 2 MHz, so one clk cycle = 1/14 MHz).
//
// Drives input signals of several frequencies inside and outside the lock-in
// range f_mp/(100 + 6/7) .. f_mp/50 (19.8 kHz .. 40 kHz), some with fractional
// periods (in clk cycles), and checks that the output period settles to the
// input period within one phase difference (one clk cycle) per period and on
// average, and that outside the range m reaches its limit. It also counts how
// often each mechanism of the loop occurred: states I-IV, carry and borrow of
// U/D-counter_n, the 1+1/k divide mode, a lead and a lag pulse, both m limits,
// and that after a step of the input frequency the loop relocks within
// LOCK_PERIODS output periods.
module tb_dfll_top;
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

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input generator: period = per_num/per_den cycles, high for half of it
  int per_num = 4900, per_den = 10;   // period * per_den
  longint acc = 0;
  int since = 0, cur_len = 490;
  always @(posedge clk) begin
    if (since + 1 >= cur_len) begin
      since <= 0;
      acc   <= acc + longint'(per_num);
      cur_len <= int'((acc + longint'(per_num)) / longint'(per_den)) - int'(acc / longint'(per_den));
      fin   <= 1'b1;
    end else begin
      since <= since + 1;
      if (since + 1 == cur_len / 2) fin <= 1'b0;
    end
  end

  // output period measurement
  logic fout_d = 0;
  longint last_rise = 0;
  int tout_last = 0;
  int n_out = 0;
  always @(posedge clk) begin
    fout_d <= fout;
    if (fout && !fout_d) begin
      tout_last <= int'(cycle - last_rise);
      last_rise <= cycle;
      n_out <= n_out + 1;
    end
  end

  // mechanism counters
  int c_up = 0, c_hold = 0, c_down = 0, c_xfer = 0, c_carry = 0, c_borrow = 0;
  int m_out_of_range = 0, max_lock = 0;
  // A step locks within this many output periods: one measurement spans two
  // input periods, a step inside a measurement spoils it, and the correction
  // applies from the next output period, so three measurements plus two periods.
  localparam int LOCK_PERIODS = 8;
  int c_div = 0, c_lead = 0, c_lag = 0, c_max = 0, c_min = 0;
  meas_state_e st_d = ST_XFER;
  always @(posedge clk) if (rst_n) begin
    st_d <= state;
    if (state != st_d) begin
      case (state)
        ST_UP:   c_up++;
        ST_HOLD: c_hold++;
        ST_DOWN: c_down++;
        default: ;
      endcase
    end
    if (xfer)   c_xfer++;
    if (carry)  c_carry++;
    if (borrow) c_borrow++;
    if (!dc1)   c_div++;
    if (lead)   c_lead++;
    if (lag)    c_lag++;
    // a step of U/D-counter_n stopped by an m limit
    if (dut.u_cnt_n.over  && dut.u_cnt_m.at_max && !dut.load) c_max++;
    if (dut.u_cnt_n.under && dut.u_cnt_m.at_min && !dut.load) c_min++;
    // m never leaves its range
    if (m < 8'd50 || m > 8'd100) m_out_of_range++;
  end

  function automatic int exp_ratio7(int num, int den); // expected m*K+n, clamped
    int t = (num + den/2) / den;
    if (t > 100*K + K-1) t = 100*K + K-1;
    if (t < 50*K) t = 50*K;
    return t;
  endfunction

  task automatic run_freq(int num, int den, int settle_in, int meas_out, bit in_range,
                          bit do_reset);
    longint sum = 0;
    int cnt = 0, worst = 0, r, at_lim = 0;
    per_num = num; per_den = den;
    if (do_reset) begin
      @(negedge clk) rst_n = 0;
      repeat (3) @(negedge clk);
      rst_n = 1;
    end
    // settle
    begin
      int start_n = n_out, seen = n_out, last_bad = n_out;
      repeat (settle_in * num / den) begin
        @(negedge clk);
        if (int'(m) * K + int'(n) == exp_ratio7(num, den)) at_lim++;
        if (n_out != seen) begin
          seen = n_out;
          r = tout_last * den - num; if (r < 0) r = -r;
          if (r > 2 * den) last_bad = n_out;
        end
      end
      // lock time: output periods until the last one more than a phase
      // difference away (one measurement takes two input periods)
      if (in_range && !do_reset) begin
        checks++;
        if (last_bad - start_n > LOCK_PERIODS) begin
          failures++;
          $display("FAIL T_in=%0d/%0d: locked only after %0d output periods", num, den, last_bad - start_n);
        end
      end
      if (!do_reset && last_bad - start_n > max_lock) max_lock = last_bad - start_n;
    end
    // measure
    begin
      int start_n = n_out;
      int seen = start_n;
      while (n_out < start_n + meas_out) begin
        @(negedge clk);
        if (int'(m) * K + int'(n) == exp_ratio7(num, den)) at_lim++;
        if (n_out != seen) begin
          seen = n_out;
          sum += longint'(tout_last); cnt++;
          r = tout_last * den - num;
          if (r < 0) r = -r;
          if (r > worst) worst = r;
        end
      end
    end
    if (in_range) begin
      // each period within one phase difference (plus input's own fraction)
      checks++;
      if (worst > den + den) begin
        failures++;
        $display("FAIL T_in=%0d/%0d: worst period error %0d/%0d cycles", num, den, worst, den);
      end
      // average period within one phase difference
      checks++;
      if ((sum * den - longint'(num) * cnt) > longint'(cnt) * den ||
          (longint'(num) * cnt - sum * den) > longint'(cnt) * den) begin
        failures++;
        $display("FAIL T_in=%0d/%0d: mean period %0d/%0d", num, den, sum, cnt);
      end
      // division ratio
      checks++;
      r = int'(m) * K + int'(n) - (num + den/2) / den;
      if (r > 1 || r < -1) begin
        failures++;
        $display("FAIL T_in=%0d/%0d: m=%0d n=%0d", num, den, m, n);
      end
    end else begin
      // the ratio reaches its limit (out of range the loop does not hold it:
      // the phase keeps slipping and the measurements alias)
      checks++;
      if (at_lim == 0) begin
        failures++;
        $display("FAIL out of range T_in=%0d/%0d: limit not reached", num, den);
      end
    end
    $display("T_in=%0d/%0d cycles: m=%0d n=%0d mean T_out=%0d/%0d worst dev=%0d/%0d",
             num, den, m, n, sum, cnt, worst, den);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    // acquisition from reset
    run_freq(4900, 10, 40, 20, 1, 1);   // 28.6 kHz
    run_freq(3500, 10, 40, 20, 1, 1);   // 40 kHz, upper limit (m = 50, n = 0)
    run_freq(7060, 10, 60, 20, 1, 1);   // 19.83 kHz, lower limit (m = 100, n = 6)
    run_freq(4667, 10, 60, 30, 1, 1);   // 30 kHz, fractional period
    run_freq(7300, 10, 60, 10, 0, 1);   // 19.2 kHz: below range, m stops at 100
    run_freq(3300, 10, 60, 10, 0, 1);   // 42.4 kHz: above range, m stops at 50
    // tracking a frequency that moves without reset
    run_freq(5003, 10, 30, 20, 1, 0);
    run_freq(5600, 10, 30, 20, 1, 0);
    run_freq(6300, 10, 30, 20, 1, 0);
    run_freq(5200, 10, 30, 20, 1, 0);
    run_freq(4000, 10, 30, 20, 1, 0);   // 35 kHz
    // mechanisms
    checks++; if (m_out_of_range != 0) begin failures++; $display("FAIL m left 50..100"); end
    checks++; if (c_up == 0)     begin failures++; $display("FAIL state I never"); end
    checks++; if (c_hold == 0)   begin failures++; $display("FAIL state II never"); end
    checks++; if (c_down == 0)   begin failures++; $display("FAIL state III never"); end
    checks++; if (c_xfer == 0)   begin failures++; $display("FAIL transfer never"); end
    checks++; if (c_carry == 0)  begin failures++; $display("FAIL carry never"); end
    checks++; if (c_borrow == 0) begin failures++; $display("FAIL borrow never"); end
    checks++; if (c_div == 0)    begin failures++; $display("FAIL 1+1/k division never"); end
    checks++; if (c_lead == 0)   begin failures++; $display("FAIL up count never"); end
    checks++; if (c_lag == 0)    begin failures++; $display("FAIL down count never"); end
    checks++; if (c_max == 0)    begin failures++; $display("FAIL m_max limit never"); end
    checks++; if (c_min == 0)    begin failures++; $display("FAIL m_min limit never"); end
    $display("longest relock after a step: %0d output periods", max_lock);
    $display("events: I=%0d II=%0d III=%0d xfer=%0d carry=%0d borrow=%0d div=%0d up=%0d down=%0d max=%0d min=%0d",
             c_up, c_hold, c_down, c_xfer, c_carry, c_borrow, c_div, c_lead, c_lag, c_max, c_min);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
