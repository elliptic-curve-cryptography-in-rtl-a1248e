// gf_reduce - combinational reduction of an IN_W-bit polynomial modulo the
// field polynomial F(x) = x^M + (low terms) of the chosen Koblitz curve.
//
// Works from the top bit down: every set bit i >= M is cleared and folded
// back as x^(i-M) * (F(x) - x^M). Because the low terms of every supported
// F(x) have degree well below M, one pass from the top suffices. The loop is
// fully unrolled into an XOR network; there is no clock and no state.
// Used by the squarer (IN_W = 2M-1) and by the multiplier (shift and
// final accumulator reduction). The reduction method is this implementation's
// choice; the design only requires "reduce modulo F(x)".
module gf_reduce
  import gf_pkg::*;
#(
  parameter int M    = 163,
  parameter int IN_W = 2 * M - 1
) (
  input  logic [IN_W-1:0] c,
  output logic [M-1:0]    z
);
  localparam logic [M-1:0] FLOW = M'(field_poly_low(M));
  localparam int W = (IN_W > M) ? IN_W : M;

  logic [W-1:0] t;

  always_comb begin
    t = W'(c);
    for (int i = W - 1; i >= M; i--) begin
      if (t[i]) begin
        t[i]         = 1'b0;
        t[i-M +: M] ^= FLOW;
      end
    end
    z = t[M-1:0];
  end
endmodule
