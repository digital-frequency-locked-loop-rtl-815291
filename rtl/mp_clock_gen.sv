// mp_clock_gen: K-phase clock generator.
//
// Produces K copies of one clock of frequency f_mp, copy i delayed by i phase
// differences (T_mp / K) from copy 0. A modulo-K phase counter advances once per
// master clock cycle (master frequency K * f_mp). Phase i rises in the cycle in
// which the counter equals i; `rise[i]` flags that cycle and is the enable the
// rest of the loop uses in place of the phase's clock edge. `phase[i]` is the
// waveform itself, high for (K+1)/2 of every K cycles (odd K cannot give exactly
// 50 % duty at this resolution).
//
// The design treats the multi-phase clock as a given source with equally spaced
// phases; building it from a counter on a faster master clock is this
// implementation's choice, as is the duty cycle.
//
// Timing: ph resets to 0, so phase 0 rises in the first cycle after reset.
module mp_clock_gen #(
  parameter int unsigned K = dfll_pkg::K_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic [$clog2(K)-1:0] ph,     // index of the phase rising in this cycle
  output logic [K-1:0]         rise,   // one-hot: rising edge of phase i in this cycle
  output logic [K-1:0]         phase   // phase waveforms
);
  localparam int unsigned HI = (K + 1) / 2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                ph <= '0;
    else if (int'(ph) == int'(K) - 1) ph <= '0;
    else                       ph <= ph + 1'b1;
  end

  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      int unsigned d;
      rise[i]  = (int'(ph) == int'(i));
      // cycles elapsed since phase i last rose
      d        = (int'(ph) >= int'(i)) ? (int'(ph) - int'(i)) : (int'(ph) + K - int'(i));
      phase[i] = (d < HI);
    end
  end
endmodule
