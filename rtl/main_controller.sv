// main_controller - secure Ethernet link: two frame filters, the encrypter and
// decrypter interfaces and the ECC core between two Ethernet ports.
//
// Port A faces the protected host, port B the untrusted network.
//   A -> B: frame_filter u_filt_enc (destination-port rule) sends the selected
//           connection's frames through encrypter_interface, which returns two
//           encrypted frames (header + C1, header + all C2) to the same
//           filter's transmitter on port B; other frames pass unchanged.
//   B -> A: frame_filter u_filt_dec (source-port rule) sends selected frames
//           to decrypter_interface, which pairs a C1 frame with the next C2
//           frame and returns the recovered frame on port A.
// Each filter is set up by a configuration frame arriving on its own receive
// port. The ECC core (ecc_soft_ip) is shared: its encrypter uses the peer's
// public key (peer_xQ, peer_yQ), its decrypter the own private key priv_d, and
// its key generator computes the own public key (own_xQ, own_yQ) from priv_d
// on kg_start so that it can be handed to the peer.
//
// Ports carry bytes of frames without preamble and FCS on a valid/ready/last
// handshake, all on one clock with synchronous active-high reset. Timing is
// that of the parts: store-and-forward in the filters, one byte per clock on
// every port, plus the encryption or decryption time of each frame.
// The structure (two filters, two interfaces, ECC core inside the controller)
// follows the design; a single clock domain and byte-stream ports instead of
// the MAC/PHY interfaces and clock-crossing FIFOs are this implementation's.
module main_controller #(
  parameter int M        = 163,
  parameter int D        = 8,
  parameter int MAX_DATA = 1400
) (
  input  logic         clk,
  input  logic         reset,
  // keys
  input  logic [M-1:0] priv_d,
  input  logic [M-1:0] peer_xQ,
  input  logic [M-1:0] peer_yQ,
  input  logic         kg_start,
  output logic [M-1:0] own_xQ,
  output logic [M-1:0] own_yQ,
  output logic         kg_done,
  // port A (protected side)
  input  logic [7:0]   a_rx_data,
  input  logic         a_rx_valid,
  input  logic         a_rx_last,
  output logic         a_rx_ready,
  output logic [7:0]   a_tx_data,
  output logic         a_tx_valid,
  output logic         a_tx_last,
  input  logic         a_tx_ready,
  // port B (network side)
  input  logic [7:0]   b_rx_data,
  input  logic         b_rx_valid,
  input  logic         b_rx_last,
  output logic         b_rx_ready,
  output logic [7:0]   b_tx_data,
  output logic         b_tx_valid,
  output logic         b_tx_last,
  input  logic         b_tx_ready,
  // status
  output logic         enc_configured,
  output logic         dec_configured,
  output logic [1:0]   enc_class,       // last frame on A: 0 forwarded, 1 encrypted, 2 configuration
  output logic [1:0]   dec_class        // last frame on B: 0 forwarded, 1 decrypted, 2 configuration
);
  localparam int FRAME = 54 + MAX_DATA + 128;  // room for the ciphertext overhead

  // A -> B
  logic [7:0] ecr_data, ecb_data;
  logic       ecr_valid, ecr_last, ecr_ready, ecb_valid, ecb_last, ecb_ready;
  frame_filter #(.MAX_FRAME(FRAME), .CHECK_DST_PORT(1'b1)) u_filt_enc (
    .clk, .reset,
    .rx_data(a_rx_data), .rx_valid(a_rx_valid), .rx_last(a_rx_last), .rx_ready(a_rx_ready),
    .tx_data(b_tx_data), .tx_valid(b_tx_valid), .tx_last(b_tx_last), .tx_ready(b_tx_ready),
    .cr_data(ecr_data), .cr_valid(ecr_valid), .cr_last(ecr_last), .cr_ready(ecr_ready),
    .cb_data(ecb_data), .cb_valid(ecb_valid), .cb_last(ecb_last), .cb_ready(ecb_ready),
    .configured(enc_configured), .last_class(enc_class));

  // B -> A
  logic [7:0] dcr_data, dcb_data;
  logic       dcr_valid, dcr_last, dcr_ready, dcb_valid, dcb_last, dcb_ready;
  frame_filter #(.MAX_FRAME(FRAME), .CHECK_DST_PORT(1'b0)) u_filt_dec (
    .clk, .reset,
    .rx_data(b_rx_data), .rx_valid(b_rx_valid), .rx_last(b_rx_last), .rx_ready(b_rx_ready),
    .tx_data(a_tx_data), .tx_valid(a_tx_valid), .tx_last(a_tx_last), .tx_ready(a_tx_ready),
    .cr_data(dcr_data), .cr_valid(dcr_valid), .cr_last(dcr_last), .cr_ready(dcr_ready),
    .cb_data(dcb_data), .cb_valid(dcb_valid), .cb_last(dcb_last), .cb_ready(dcb_ready),
    .configured(dec_configured), .last_class(dec_class));

  // ECC core
  logic           enc_start, enc_reuse_k, enc_done, dec_start, dec_reuse_k, dec_done;
  logic [2*M-1:0] enc_data_in, dec_data_out;
  logic [M-1:0]   enc_xC1, enc_yC1, enc_xC2, enc_yC2;
  logic [M-1:0]   dec_xC1, dec_yC1, dec_xC2, dec_yC2;

  encrypter_interface #(.M(M), .MAX_DATA(MAX_DATA)) u_enc_if (
    .clk, .reset,
    .in_data(ecr_data), .in_valid(ecr_valid), .in_last(ecr_last), .in_ready(ecr_ready),
    .out_data(ecb_data), .out_valid(ecb_valid), .out_last(ecb_last), .out_ready(ecb_ready),
    .enc_start, .enc_reuse_k, .enc_data_in, .enc_xC1, .enc_yC1, .enc_xC2, .enc_yC2,
    .enc_done);

  decrypter_interface #(.M(M), .MAX_DATA(MAX_DATA)) u_dec_if (
    .clk, .reset,
    .in_data(dcr_data), .in_valid(dcr_valid), .in_last(dcr_last), .in_ready(dcr_ready),
    .out_data(dcb_data), .out_valid(dcb_valid), .out_last(dcb_last), .out_ready(dcb_ready),
    .dec_start, .dec_reuse_k, .dec_xC1, .dec_yC1, .dec_xC2, .dec_yC2, .dec_data_out,
    .dec_done);

  ecc_soft_ip #(.M(M), .D(D)) u_core (
    .clk, .reset,
    .kg_start, .kg_d(priv_d), .kg_xQ(own_xQ), .kg_yQ(own_yQ), .kg_done,
    .enc_start, .enc_reuse_k, .enc_xQ(peer_xQ), .enc_yQ(peer_yQ), .enc_data_in,
    .enc_xC1, .enc_yC1, .enc_xC2, .enc_yC2, .enc_done,
    .dec_start, .dec_reuse_k, .dec_d(priv_d), .dec_xC1, .dec_yC1, .dec_xC2, .dec_yC2,
    .dec_data_out, .dec_done);
endmodule
