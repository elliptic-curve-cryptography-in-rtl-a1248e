// gf_divider - GF(2^M) divider z = g / h that picks its architecture when it
// is elaborated.
//
// Two dividers exist: the binary algorithm (gf_divider_binary, up to 2M
// cycles, small) and the Itoh-Tsujii inversion (gf_divider_itoh, M squaring
// cycles plus 10 to 13 multiplications). Their cost depends on the digit size D
// of the field multiplier, so the faster one is chosen by gf_pkg::use_itoh:
// when (M-1) + steps * ceil(M/D) <= 2M the Itoh-Tsujii divider is built,
// otherwise the binary one. For M = 163 this picks the binary divider for
// D up to 9 (e.g. D = 8) and the Itoh-Tsujii divider from D = 10 up (e.g. D = 82).
// This selection rule is the design's. Interface and timing are those of the
// chosen divider: start samples g and h, done pulses when z is valid.
module gf_divider
  import gf_pkg::*;
#(
  parameter int M = 163,
  parameter int D = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [M-1:0] g,
  input  logic [M-1:0] h,
  output logic [M-1:0] z,
  output logic         done
);
  localparam bit ITOH = use_itoh(M, D);

  if (ITOH) begin : g_itoh
    gf_divider_itoh #(.M(M), .D(D)) u_div (.clk, .reset, .start, .g, .h, .z, .done);
  end else begin : g_binary
    gf_divider_binary #(.M(M)) u_div (.clk, .reset, .start, .g, .h, .z, .done);
  end
endmodule
