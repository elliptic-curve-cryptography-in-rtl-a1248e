// key_generator - public key generation Q = d * G for the chosen Koblitz
// curve.
//
// One point_multiplier, fed with the curve generator G (from gf_pkg) and the
// private key d. start samples d; done pulses for one cycle when (xQ, yQ) is
// valid, one point multiplication later; the outputs hold until the next
// start. d is taken as tau-adic digits, like every scalar in this core.
// The structure (a single point multiplier) follows the design.
module key_generator
  import gf_pkg::*;
#(
  parameter int M = 163,
  parameter int D = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [M-1:0] d,
  output logic [M-1:0] xQ,
  output logic [M-1:0] yQ,
  output logic         done
);
  localparam logic [M-1:0] GX = M'(gen_x(M));
  localparam logic [M-1:0] GY = M'(gen_y(M));

  point_multiplier #(.M(M), .D(D)) u_pm (.clk, .reset, .start, .xP(GX), .yP(GY), .k(d),
                                         .xQ, .yQ, .done);
endmodule
