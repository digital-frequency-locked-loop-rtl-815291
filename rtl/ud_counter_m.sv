// ud_counter_m: U/D-counter_m, the integer part m of the division ratio.
//
// Counts up by one on `carry` and down by one on `borrow` from U/D-counter_n,
// and stays within [M_MIN, M_MAX], the limits that set the lock-in range
// f_mp/(M_MAX + (K-1)/K) <= f_in <= f_mp/M_MIN. `at_max`/`at_min` tell
// U/D-counter_n that a limit has been reached. Limits 50 and 100 follow the
// design's lock-range configuration; the reset value (75) is this
// implementation's choice.
//
// Timing: m changes at the clock edge that ends a carry or borrow cycle.
module ud_counter_m
  import dfll_pkg::*;
#(
  parameter int unsigned M_MIN  = M_MIN_DEF,
  parameter int unsigned M_MAX  = M_MAX_DEF,
  parameter int unsigned M_INIT = M_INIT_DEF
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          carry,
  input  logic          borrow,
  output logic [MW-1:0] m,
  output logic          at_max,
  output logic          at_min
);
  assign at_max = (m >= MW'(M_MAX));
  assign at_min = (m <= MW'(M_MIN));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   m <= MW'(M_INIT);
    else if (carry  && !at_max)   m <= m + 1'b1;
    else if (borrow && !at_min)   m <= m - 1'b1;
  end
endmodule
