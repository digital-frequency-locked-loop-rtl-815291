// ud_counter_phase: one U/D-counter_i of the digital frequency comparator.
//
// Counts the rising edges of phase i of the multi-phase clock (`en` = that
// phase's edge enable) while `up` or `dn` is set, upwards or downwards. `clr`
// returns it to its start value XC, the "X" of the design; clear wins over
// counting. The value is signed so that a down count past zero stays exact.
// The start value 20 is read from the simulation waveforms of the design; the
// width is this implementation's choice.
//
// Timing: the count changes at the clock edge that ends the enabled cycle.
module ud_counter_phase
  import dfll_pkg::*;
#(
  parameter int XC = XC_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 up,
  input  logic                 dn,
  input  logic                 clr,
  output logic signed [CW-1:0] cnt
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= CW'(XC);
    else if (clr)        cnt <= CW'(XC);
    else if (en && up)   cnt <= cnt + 1'b1;
    else if (en && dn)   cnt <= cnt - 1'b1;
  end
endmodule
