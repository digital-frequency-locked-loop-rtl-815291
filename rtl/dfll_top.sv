// dfll_top: all-digital frequency-locked loop with an m+n/k multi-phase clock
// divider.
//
// The output signal is the K-phase clock divided by R = m + n/K. The digital
// frequency comparator measures, once every two input periods, the difference
// between the input and output periods in phase differences of the K-phase
// clock (T_mp/K). The FEC adds that error to the fractional count n; each whole
// K of it moves the integer part m by one. The next output period then matches
// the input period to within one phase difference. Lock-in range:
//   f_mp/(M_MAX + (K-1)/K) <= f_in <= f_mp/M_MIN.
// With f_mp = 2 MHz, K = 7, M_MIN = 50, M_MAX = 100: 19.8 kHz .. 40 kHz.
//
// All logic runs on `clk` at K*f_mp (14 MHz for the configuration above): one
// cycle is one phase difference. `fin` must be synchronous to clk.
// Outputs besides `fout` expose the loop state for observation.
module dfll_top
  import dfll_pkg::*;
#(
  parameter int unsigned K      = K_DEF,
  parameter int          XC     = XC_DEF,
  parameter int unsigned M_MIN  = M_MIN_DEF,
  parameter int unsigned M_MAX  = M_MAX_DEF,
  parameter int unsigned M_INIT = M_INIT_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 fin,
  output logic                 fout,
  output logic [K-1:0]         mp_clk,    // multi-phase clock
  output logic                 clk_1k,    // 1+1/k divider output
  output logic                 dc1,
  output logic                 exor,      // frequency error pulse
  output logic                 lead,
  output logic                 lag,
  output meas_state_e          state,
  output logic signed [QW-1:0] q,
  output logic                 xfer,
  output logic [MW-1:0]        m,
  output logic [$clog2(K)-1:0] n,
  output logic                 carry,
  output logic                 borrow,
  output logic                 period_start
);
  logic [K-1:0] rise;
  logic clr, load, busy, at_max, at_min;
  logic signed [QW-1:0] delta;

  mp_clock_gen #(.K(K)) u_mpc (.clk, .rst_n, .ph(), .rise, .phase(mp_clk));

  freq_comparator #(.K(K), .XC(XC)) u_dfc (
    .clk, .rst_n, .fin, .fout, .rise, .clr,
    .q, .xfer, .lead, .lag, .state, .exor
  );

  fec #(.K(K), .XC(XC)) u_fec (
    .clk, .rst_n, .xfer, .q, .m, .n, .clr, .load, .delta
  );

  ud_counter_n #(.K(K), .XC(XC)) u_cnt_n (
    .clk, .rst_n, .load, .delta, .m_at_max(at_max), .m_at_min(at_min),
    .carry, .borrow, .busy, .n
  );

  ud_counter_m #(.M_MIN(M_MIN), .M_MAX(M_MAX), .M_INIT(M_INIT)) u_cnt_m (
    .clk, .rst_n, .carry, .borrow, .m, .at_max, .at_min
  );

  mpc_divider #(.K(K), .M_INIT(M_INIT)) u_div (
    .clk, .rst_n, .rise, .phase(mp_clk), .m, .n, .hold(busy | load),
    .fout, .dc1, .clk_1k, .start(period_start)
  );
endmodule
