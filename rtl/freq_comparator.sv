// freq_comparator: digital frequency comparator of the DFLL.
//
// T-FF1 and T-FF2 toggle on the rising edges of the input and output signals;
// their EX-OR is high between an edge of one and the next edge of the other.
// T-FF3 divides the EX-OR so that one pulse is counted up (state I) and the
// next counted down (state III). K up/down counters, one per phase of the
// multi-phase clock, count that phase's edges during the pulses; since exactly
// one phase rises per phase difference, their sum counts the pulse length in
// phase differences. The adder gives Q = X + Y - Z, where X = K*XC is the sum of
// the counters' start values, Y the length of the first pulse and Z of the
// second, i.e. X plus (input period - output period) in phase differences.
// `clr` (from the FEC) returns all counters to XC.
//
// Structure after the design; edge detection in the master clock domain and
// the sign handling when the output leads (see dfc_logic_gate) are this
// implementation's choices.
//
// Timing: fin and fout must be synchronous to clk. Q is valid in the cycle in
// which `xfer` is high.
module freq_comparator
  import dfll_pkg::*;
#(
  parameter int unsigned K  = K_DEF,
  parameter int          XC = XC_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 fin,
  input  logic                 fout,
  input  logic [K-1:0]         rise,   // phase edge enables of the multi-phase clock
  input  logic                 clr,
  output logic signed [QW-1:0] q,
  output logic                 xfer,
  output logic                 lead,
  output logic                 lag,
  output meas_state_e          state,
  output logic                 exor
);
  logic q1, q2, q3, r1;
  logic signed [CW-1:0] cnt [K];

  tff u_tff1 (.clk, .rst_n, .t(fin),  .q(q1), .rose(r1));
  tff u_tff2 (.clk, .rst_n, .t(fout), .q(q2), .rose());
  assign exor = q1 ^ q2;
  tff u_tff3 (.clk, .rst_n, .t(exor), .q(q3), .rose());

  dfc_logic_gate u_gate (
    .clk, .rst_n, .fin_rose(r1), .exor, .tff3(q3),
    .lead, .lag, .xfer, .state
  );

  for (genvar i = 0; i < K; i++) begin : g_cnt
    ud_counter_phase #(.XC(XC)) u_cnt (
      .clk, .rst_n, .en(rise[i]), .up(lead), .dn(lag), .clr, .cnt(cnt[i])
    );
  end

  // adder
  always_comb begin
    q = '0;
    for (int i = 0; i < K; i++) q = q + QW'(cnt[i]);
  end
endmodule
