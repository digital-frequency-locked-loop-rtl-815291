// tff: T flip-flop that toggles on each rising edge of its input `t`.
//
// The input is a level that is synchronous to the master clock; its rising edge
// is found by comparing it with its value one cycle earlier, and q toggles at the
// same clock edge that registers the new level. `rose` flags that cycle.
// The design names the T-FFs (T-FF1 on the input signal, T-FF2 on the output
// signal, T-FF3 on the EX-OR) but not their construction: detecting the edge
// inside the master clock domain is this implementation's choice.
//
// Timing: q and rose change one master cycle after t rises. Reset clears q.
module tff (
  input  logic clk,
  input  logic rst_n,
  input  logic t,
  output logic q,
  output logic rose     // t rose in the previous cycle (q has just toggled)
);
  logic t_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_d  <= 1'b0;
      q    <= 1'b0;
      rose <= 1'b0;
    end else begin
      t_d  <= t;
      rose <= t & ~t_d;
      if (t & ~t_d) q <= ~q;
    end
  end
endmodule
