// dfll_pkg: constants and types shared by the blocks of the multi-phase-clock
// digital frequency-locked loop (DFLL).
//
// The whole loop runs on one master clock whose period is one phase difference
// of the K-phase clock (master frequency = K * f_mp). Every event of the
// multi-phase clock (a rising edge of phase i) is a one-cycle enable in that
// domain, so all timing is resolved to one phase difference, the resolution the
// frequency comparator of the design is built around.
//
// Values that follow the design description: K = 7 phases, m_min = 50,
// m_max = 100 (the lock-range configuration), per-phase counter start value 20.
// Own choices: counter and register widths, the reset value of m.
package dfll_pkg;

  // Number of phases of the multi-phase clock (k).
  localparam int unsigned K_DEF      = 7;
  // Reset value of each U/D-counter_i of the frequency comparator.
  localparam int          XC_DEF     = 20;
  // Limits of the integer division ratio m.
  localparam int unsigned M_MIN_DEF  = 50;
  localparam int unsigned M_MAX_DEF  = 100;
  // Reset value of m (own choice: middle of the range).
  localparam int unsigned M_INIT_DEF = 75;

  // Width of one signed U/D-counter_i.
  localparam int CW = 10;
  // Width of the signed adder output Q and of the signed error arithmetic.
  localparam int QW = 14;
  // Width of m (unsigned).
  localparam int MW = 8;

  // Measurement states of the frequency comparator (decoded from EX-OR and T-FF3).
  typedef enum logic [1:0] {
    ST_UP   = 2'd0,  // state I  : EX-OR high, T-FF3 high: count up
    ST_HOLD = 2'd1,  // state II : EX-OR low,  T-FF3 high: hold
    ST_DOWN = 2'd2,  // state III: EX-OR high, T-FF3 low : count down
    ST_XFER = 2'd3   // state IV : EX-OR low,  T-FF3 low : transfer Q, reset counters
  } meas_state_e;

endpackage
