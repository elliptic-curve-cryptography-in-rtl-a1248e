// ecc_soft_ip - complete elliptic-curve cryptography core over GF(2^M) for
// the SEC 2 Koblitz curves (M = 163, 233, 283, 409 or 571).
//
// Three independent units, each with its own start/done handshake:
//   * key_generator  (kg_*)  : Q = d * G                       (1 point multiplier)
//   * ecc_encrypter  (enc_*) : C1 = k*G, C2 = data + k*Q       (2 point multipliers, 1 adder)
//   * ecc_decrypter  (dec_*) : data = C2 - d*C1                (1 point multiplier, 1 adder)
// M selects the curve; D (1 .. ceil(M/2)) is the number of bits the field
// multipliers process per clock and trades area for speed, and also decides
// which divider architecture is built. All units share clk and a synchronous,
// active-high reset; their timing is given in each unit's header.
// The split into these three units follows the design; bringing each unit's
// ports out side by side is this implementation's.
module ecc_soft_ip
  import gf_pkg::*;
#(
  parameter int M = 163,
  parameter int D = 8
) (
  input  logic           clk,
  input  logic           reset,
  // key generation
  input  logic           kg_start,
  input  logic [M-1:0]   kg_d,
  output logic [M-1:0]   kg_xQ,
  output logic [M-1:0]   kg_yQ,
  output logic           kg_done,
  // encryption
  input  logic           enc_start,
  input  logic           enc_reuse_k,
  input  logic [M-1:0]   enc_xQ,
  input  logic [M-1:0]   enc_yQ,
  input  logic [2*M-1:0] enc_data_in,
  output logic [M-1:0]   enc_xC1,
  output logic [M-1:0]   enc_yC1,
  output logic [M-1:0]   enc_xC2,
  output logic [M-1:0]   enc_yC2,
  output logic           enc_done,
  // decryption
  input  logic           dec_start,
  input  logic           dec_reuse_k,
  input  logic [M-1:0]   dec_d,
  input  logic [M-1:0]   dec_xC1,
  input  logic [M-1:0]   dec_yC1,
  input  logic [M-1:0]   dec_xC2,
  input  logic [M-1:0]   dec_yC2,
  output logic [2*M-1:0] dec_data_out,
  output logic           dec_done
);
  key_generator #(.M(M), .D(D)) u_keygen (
    .clk, .reset, .start(kg_start), .d(kg_d), .xQ(kg_xQ), .yQ(kg_yQ), .done(kg_done));

  ecc_encrypter #(.M(M), .D(D)) u_enc (
    .clk, .reset, .start(enc_start), .reuse_k(enc_reuse_k), .xQ(enc_xQ), .yQ(enc_yQ),
    .data_in(enc_data_in), .xC1(enc_xC1), .yC1(enc_yC1), .xC2(enc_xC2), .yC2(enc_yC2),
    .done(enc_done));

  ecc_decrypter #(.M(M), .D(D)) u_dec (
    .clk, .reset, .start(dec_start), .reuse_k(dec_reuse_k), .d(dec_d), .xC1(dec_xC1),
    .yC1(dec_yC1), .xC2(dec_xC2), .yC2(dec_yC2), .data_out(dec_data_out), .done(dec_done));
endmodule
