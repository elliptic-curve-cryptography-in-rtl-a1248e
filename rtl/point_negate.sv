// point_negate - negative of an affine point on a binary (Koblitz) curve.
//
// On y^2 + xy = x^3 + ax^2 + b the inverse of (x, y) is (x, x + y), where
// + is the field addition (bitwise XOR). Combinational: x3 = x1 and
// y3 = x1 ^ y1. The decrypter puts it in front of the point adder to turn an
// addition into the subtraction C2 - d*C1. The point at infinity, written
// (0, 0), maps to itself.
module point_negate #(
  parameter int M = 163
) (
  input  logic [M-1:0] x1,
  input  logic [M-1:0] y1,
  output logic [M-1:0] x3,
  output logic [M-1:0] y3
);
  assign x3 = x1;
  assign y3 = x1 ^ y1;
endmodule
