// ud_counter_n: U/D-counter_n, the fractional part of the division ratio.
//
// The register holds n in an offset form: it is "in range" when
// X-K < nreg <= X (X = K*XC), and the divider receives n = nreg - (X-K+1),
// 0..K-1. On `load` it counts by `delta` (the frequency error from the FEC).
// Then, one step per cycle as in the design's flow chart:
//   nreg > X    : nreg -= K and `carry`  (U/D-counter_m counts up)
//   nreg <= X-K : nreg += K and `borrow` (U/D-counter_m counts down)
// until it is in range again. When m is at a limit the step that would pass it
// clamps n to its end of the range instead (largest or smallest ratio).
// The flow chart prints X-k < n < X; a value of exactly X would then step
// forever between X and X+k, so this design accepts nreg = X as in range.
// The offset form, the limit handling and counting by the error (instead of
// loading Q) are this implementation's choices.
//
// Timing: a load takes one cycle, each K-step one more; `busy` is high while
// out of range. carry/borrow are combinational for U/D-counter_m.
module ud_counter_n
  import dfll_pkg::*;
#(
  parameter int unsigned K  = K_DEF,
  parameter int          XC = XC_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic signed [QW-1:0] delta,
  input  logic                 m_at_max,
  input  logic                 m_at_min,
  output logic                 carry,
  output logic                 borrow,
  output logic                 busy,
  output logic [$clog2(K)-1:0] n
);
  localparam int X  = int'(K) * XC;
  localparam int LO = X - int'(K) + 1;   // smallest in-range value

  logic signed [QW-1:0] nreg, nsub;
  logic over, under;

  always_comb begin
    over   = nreg > QW'(X);
    under  = nreg < QW'(LO);
    busy   = over | under;
    carry  = ~load & over  & ~m_at_max;
    borrow = ~load & under & ~m_at_min;
    nsub   = nreg - QW'(LO);
    n      = busy ? '0 : nsub[$clog2(K)-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     nreg <= QW'(LO);
    else if (load)  nreg <= nreg + delta;
    else if (over)  nreg <= m_at_max ? QW'(X)  : nreg - QW'(K);
    else if (under) nreg <= m_at_min ? QW'(LO) : nreg + QW'(K);
  end
endmodule
