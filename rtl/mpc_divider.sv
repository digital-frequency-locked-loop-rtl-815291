// mpc_divider: the m+n/k multi-phase clock divider.
//
// The counter z counts the output edges of the 1+1/k divider. DC1 compares z
// with n: while z < n (DC1 low) the 1+1/k divider divides, so those periods last
// T_mp*(1+1/K); from z = n on (DC1 high) it passes the selected phase, period
// T_mp. DC2 compares z with m: when z reaches m the counter restarts and a new
// output period begins. One output period is therefore
//   n*(K+1) + (m-n)*K = m*K + n phase differences,  f_out = f_mp/(m + n/K).
// The output signal is high for the first floor(m/2) edges of each period
// (own choice of duty cycle; only its rising edge is used by the loop).
// m and n are taken at the start of each output period so every period is
// whole; if U/D-counter_n is still settling (`hold`) the previous values are
// kept. Both are this implementation's choices.
//
// Timing: `fout` rises one cycle after the edge that starts a period.
module mpc_divider
  import dfll_pkg::*;
#(
  parameter int unsigned K      = K_DEF,
  parameter int unsigned M_INIT = M_INIT_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [K-1:0]         rise,
  input  logic [K-1:0]         phase,
  input  logic [MW-1:0]        m,
  input  logic [$clog2(K)-1:0] n,
  input  logic                 hold,
  output logic                 fout,
  output logic                 dc1,      // DC1: high when n <= z
  output logic                 clk_1k,   // 1+1/k divider output
  output logic                 start     // first edge of an output period
);
  localparam int NW = $clog2(K);

  logic [MW-1:0] z, zn, m_s, m_use;
  logic [NW-1:0] n_s, n_use;
  logic          pulse, div, wrap;

  always_comb begin
    wrap  = (MW'(z + 1'b1) >= m_s);       // DC2
    zn    = wrap ? '0 : MW'(z + 1'b1);
    n_use = (wrap && !hold) ? n : n_s;
    m_use = (wrap && !hold) ? m : m_s;
    div   = (MW'(n_use) > zn);            // DC1 low: divide
    dc1   = ~(MW'(n_s) > z);
    start = pulse & wrap;
  end

  onek_divider #(.K(K)) u_1k (
    .clk, .rst_n, .rise, .phase, .div, .pulse, .clk_out(clk_1k), .sel()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z    <= MW'(M_INIT - 1);   // first edge after reset starts a period
      m_s  <= MW'(M_INIT);
      n_s  <= '0;
      fout <= 1'b0;
    end else if (pulse) begin
      z    <= zn;
      m_s  <= m_use;
      n_s  <= n_use;
      fout <= (zn < (m_use >> 1));
    end
  end
endmodule
