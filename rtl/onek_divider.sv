// onek_divider: the 1+1/k divider.
//
// A one-hot ring counter selects one phase of the K-phase clock; the selected
// phase is the output. While `div` is high, every output edge moves the ring
// counter on to the next (later) phase. The edge of that phase one phase
// difference later is masked, so the next output edge is the new phase's
// following edge: the output period becomes T_mp*(1 + 1/K). While `div` is low
// the selection stays and the output is the selected phase, period T_mp.
// The selector and rotating ring counter follow the design; masking the edge
// that follows a rotation stands in for its 1/2 divider and second selector,
// whose exact timing is not given.
//
// Interface: `rise`/`phase` from the multi-phase clock; `pulse` flags each
// output rising edge (in the cycle of the phase edge); `clk_out` is the
// selected phase waveform (it may glitch when the selection moves).
// Timing: `div` is sampled in the cycle of an output edge and decides the
// length of the period that edge starts.
module onek_divider
  import dfll_pkg::*;
#(
  parameter int unsigned K = K_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] rise,
  input  logic [K-1:0] phase,
  input  logic         div,
  output logic         pulse,
  output logic         clk_out,
  output logic [K-1:0] sel
);
  logic mask;

  assign pulse   = |(rise & sel) & ~mask;
  assign clk_out = |(phase & sel);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel  <= K'(1);
      mask <= 1'b0;
    end else begin
      mask <= pulse & div;
      if (pulse && div) sel <= {sel[K-2:0], sel[K-1]};
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(sel));
endmodule
