// dfc_logic_gate: control logic of the digital frequency comparator.
//
// EX-OR of T-FF1 (input signal) and T-FF2 (output signal) is high for the time
// between a rising edge of one signal and the next rising edge of the other.
// T-FF3 halves the EX-OR, so successive EX-OR pulses fall alternately in
// state I (T-FF3 high, count up) and state III (T-FF3 low, count down), with
// state II (hold) and state IV (transfer) in between. This block decodes those
// states and drives the U/D-counter_1~k enables:
//   lead : count up   (state I when the input edge opened the pulse,
//                      state III when the output edge opened it)
//   lag  : count down (the other two cases)
//   xfer : one-cycle strobe on entry to state IV; the FEC takes Q then.
// The state decoding, the up/hold/down/transfer sequence and the count
// directions for an input that leads follow the design description. The sign
// swap when the output signal leads is this implementation's choice: it makes
// Q - X equal (input period - output period) whichever signal leads, so that
// the loop keeps its negative feedback through a phase wrap.
//
// Timing: inputs come straight from the T-FFs, whose toggles lag the signal
// edges by one cycle. T-FF3 toggles one cycle after EX-OR rises, so the first
// cycle of a pulse takes T-FF3's next value. Outputs are combinational.
module dfc_logic_gate
  import dfll_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fin_rose,   // T-FF1 toggled this cycle
  input  logic        exor,       // T-FF1 ^ T-FF2
  input  logic        tff3,       // T-FF3 output
  output logic        lead,
  output logic        lag,
  output logic        xfer,
  output meas_state_e state
);
  logic exor_d;
  logic in_led_q;   // the input edge opened the present EX-OR pulse
  logic exor_rise, t3, in_led;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exor_d   <= 1'b0;
      in_led_q <= 1'b0;
    end else begin
      exor_d <= exor;
      if (exor_rise) in_led_q <= fin_rose;
    end
  end

  always_comb begin
    exor_rise = exor & ~exor_d;
    t3        = exor_rise ? ~tff3 : tff3;
    in_led    = exor_rise ? fin_rose : in_led_q;
    lead      = exor & (t3 == in_led);
    lag       = exor & (t3 != in_led);
    xfer      = ~exor & exor_d & ~tff3;
    unique case ({exor, t3})
      2'b11:   state = ST_UP;
      2'b01:   state = ST_HOLD;
      2'b10:   state = ST_DOWN;
      default: state = ST_XFER;
    endcase
  end

  // The counters are never told to count both ways at once.
  assert property (@(posedge clk) disable iff (!rst_n) !(lead && lag));
endmodule
