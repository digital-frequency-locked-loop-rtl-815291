// fec: frequency error control (FEC) of the DFLL.
//
// When the frequency comparator enters state IV (`xfer`), the FEC takes the
// adder value Q, forms the frequency error e = Q - X (X = K*XC, the adder's
// value with no error; e = input period - output period in phase differences)
// and hands it to U/D-counter_n, which counts n by e and then carries whole
// multiples of K into U/D-counter_m. In the same cycle it resets the
// U/D-counter_1~k to their start value.
//
// A phase wrap between the input and output edges makes the two pulses of one
// measurement differ by about one output period. The FEC therefore folds e into
// (-P/2, P/2], P = m*K + n being the present output period in phase
// differences. That fold, and counting n by e rather than replacing n with Q,
// are this implementation's choices; the first keeps a phase wrap from upsetting
// the loop, the second keeps the fractional part n between measurements so the
// loop settles to within one phase difference.
//
// Timing: `load`/`delta` are registered, one cycle after `xfer`.
module fec
  import dfll_pkg::*;
#(
  parameter int unsigned K  = K_DEF,
  parameter int          XC = XC_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 xfer,
  input  logic signed [QW-1:0] q,
  input  logic [MW-1:0]        m,
  input  logic [$clog2(K)-1:0] n,
  output logic                 clr,     // reset(X) to U/D-counter_1~k
  output logic                 load,    // count U/D-counter_n by delta
  output logic signed [QW-1:0] delta
);
  localparam int X = int'(K) * XC;

  logic signed [QW-1:0] e, ew, p;

  always_comb begin
    p  = QW'(m) * QW'(K) + QW'(n);
    e  = q - QW'(X);
    ew = e;
    if (2 * e > p)       ew = e - p;
    else if (2 * e < -p) ew = e + p;
  end

  assign clr = xfer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load  <= 1'b0;
      delta <= '0;
    end else begin
      load <= xfer;
      if (xfer) delta <= ew;
    end
  end
endmodule
