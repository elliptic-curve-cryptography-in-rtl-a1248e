// gf_squarer - combinational squaring in GF(2^M), polynomial basis.
//
// Squaring a binary polynomial only spreads its coefficients: bit a(i) moves
// to position 2i and zeros fill the odd positions, giving a (2M-1)-bit
// polynomial that gf_reduce folds back below x^M. Interface: a (M bits) in,
// c = a^2 mod F(x) (M bits) out. No clock: the caller registers c, so one
// squaring costs one clock cycle inside a sequential datapath, as the design
// intends.
module gf_squarer #(
  parameter int M = 163
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] c
);
  logic [2*M-2:0] spread;

  always_comb begin
    spread = '0;
    for (int i = 0; i < M; i++) spread[2*i] = a[i];
  end

  gf_reduce #(.M(M), .IN_W(2 * M - 1)) u_red (.c(spread), .z(c));
endmodule
