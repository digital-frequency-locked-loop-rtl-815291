// tb_dfc_logic_gate: feeds the logic gate with T-FF outputs produced by a
// behavioural model from random input/output edges, and checks its outputs
// against a count of EX-OR pulses: odd pulses are state I (count up when the
// input edge opened the pulse, down otherwise), even pulses state III (the
// reverse), the gaps after them states II and IV, and a transfer strobe at the
// end of every even pulse.
module tb_dfc_logic_gate;
  import dfll_pkg::*;
  logic clk = 0, rst_n = 0;
  logic fin_rose = 0, exor, tff3 = 0, lead, lag, xfer;
  meas_state_e state;
  logic q1 = 0, q2 = 0, exor_prev = 0;
  int checks = 0, failures = 0;
  int pulses = 0;
  bit opened_by_in = 0;
  int c_lead = 0, c_lag = 0, c_xfer = 0;
  int c_state [4] = '{0, 0, 0, 0};

  assign exor = q1 ^ q2;
  dfc_logic_gate dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ev_in, ev_out, exor_now, was_high;
    meas_state_e exp_state;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      ev_in  = ($urandom_range(0, 99) < 6);
      ev_out = ($urandom_range(0, 99) < 6);
      @(posedge clk);
      // T-FF3 toggles one cycle after EX-OR rises
      if (exor && !exor_prev) tff3 <= ~tff3;
      exor_prev <= exor;
      q1 <= q1 ^ ev_in;
      q2 <= q2 ^ ev_out;
      fin_rose <= ev_in;
      @(negedge clk);
      exor_now = exor;
      was_high = exor_prev;
      if (exor_now && !was_high) begin
        pulses++;
        opened_by_in = fin_rose;
      end
      if (exor_now) exp_state = (pulses % 2 == 1) ? ST_UP : ST_DOWN;
      else          exp_state = (pulses % 2 == 1) ? ST_HOLD : ST_XFER;
      checks++;
      if (state != exp_state) begin
        failures++; $display("FAIL i=%0d state=%0d exp=%0d", i, state, exp_state);
      end
      checks++;
      if (lead !== (exor_now && ((pulses % 2 == 1) == opened_by_in)) ||
          lag  !== (exor_now && ((pulses % 2 == 1) != opened_by_in))) begin
        failures++; $display("FAIL i=%0d lead=%b lag=%b", i, lead, lag);
      end
      checks++;
      if (xfer !== (!exor_now && was_high && pulses % 2 == 0)) begin
        failures++; $display("FAIL i=%0d xfer=%b", i, xfer);
      end
      if (lead) c_lead++;
      if (lag)  c_lag++;
      if (xfer) c_xfer++;
      c_state[state]++;
    end
    checks++;
    if (c_lead == 0 || c_lag == 0 || c_xfer == 0 || c_state[0] == 0 || c_state[1] == 0 ||
        c_state[2] == 0 || c_state[3] == 0) begin
      failures++; $display("FAIL not all cases seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
