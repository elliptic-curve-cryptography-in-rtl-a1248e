// frame_filter - selects the Ethernet frames of one configured TCP connection
// for encryption or decryption and forwards every other frame unchanged.
//
// Frames arrive as byte streams without preamble and FCS (destination MAC,
// source MAC, EtherType, payload), on a valid/ready/last handshake. Each frame
// is stored whole in a frame buffer while its header fields are captured by
// byte position:
//   bytes 0-5 destination MAC, 6-11 source MAC, 12-13 EtherType,
//   23 IPv4 protocol, 34-35 TCP source port, 36-37 TCP destination port
// (an IPv4 header of 20 bytes is assumed). At the end of the frame:
//   * a configuration frame (destination DA:02:03:04:05:06, source
//     5A:02:03:04:05:06, EtherType 0x1234) loads the connection to filter:
//     MAC destination (bytes 14-19), MAC source (20-25), TCP port (26-27).
//     It is consumed, not forwarded. Until one arrives nothing is filtered.
//   * an IPv4/TCP frame with the configured MAC addresses, the configured
//     port (destination port when CHECK_DST_PORT = 1, the encrypting side;
//     source port when 0, the decrypting side) and at least one data byte
//     is sent to the crypto output cr_*;
//   * any other frame is replayed to the transmitter tx_*.
// Frames coming back from the crypto side (cb_*) are passed to tx_* too; the
// transmitter is handed over only between frames.
//
// Timing: store-and-forward, so a frame leaves 2 cycles after its last byte
// arrived at the earliest; rx_ready is low while a stored frame is replayed.
// Frames longer than MAX_FRAME bytes are truncated.
// The filtering rule, the configuration frame and its byte layout follow the
// design; the store-and-forward buffer, the handshake and the consumption of
// the configuration frame are this implementation's.
module frame_filter #(
  parameter int MAX_FRAME      = 1514,
  parameter bit CHECK_DST_PORT = 1'b1
) (
  input  logic       clk,
  input  logic       reset,
  // from the receiver
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  input  logic       rx_last,
  output logic       rx_ready,
  // to the transmitter
  output logic [7:0] tx_data,
  output logic       tx_valid,
  output logic       tx_last,
  input  logic       tx_ready,
  // to the crypto interface
  output logic [7:0] cr_data,
  output logic       cr_valid,
  output logic       cr_last,
  input  logic       cr_ready,
  // back from the crypto interface
  input  logic [7:0] cb_data,
  input  logic       cb_valid,
  input  logic       cb_last,
  output logic       cb_ready,
  // status
  output logic       configured,
  output logic [1:0] last_class     // 0 forwarded, 1 crypto, 2 configuration
);
  localparam int AW = $clog2(MAX_FRAME + 1);
  localparam logic [47:0] CFG_DST  = 48'hDA02_0304_0506;
  localparam logic [47:0] CFG_SRC  = 48'h5A02_0304_0506;
  localparam logic [15:0] CFG_TYPE = 16'h1234;

  typedef enum logic [1:0] {RECV, DECIDE, PLAY_TX, PLAY_CR} state_t;
  state_t state;

  logic [7:0]    buf_mem [0:MAX_FRAME-1];
  logic [AW-1:0] wr_cnt, rd_ptr, len;
  logic [47:0]   h_dst, h_src, c_dst, c_src, cfg_dst, cfg_src;
  logic [15:0]   h_type, h_sport, h_dport, c_port, cfg_port;
  logic [7:0]    h_proto;

  // transmitter ownership: buffer replay or crypto return path
  logic tx_from_cb;

  assign rx_ready = (state == RECV);
  wire   rx_fire  = rx_valid && rx_ready;

  // replay read port
  logic [7:0] rd_byte;
  assign rd_byte = buf_mem[rd_ptr];
  wire   rd_last = (rd_ptr == len - 1'b1);

  always_comb begin
    tx_data  = rd_byte;
    tx_valid = (state == PLAY_TX);
    tx_last  = rd_last;
    cb_ready = 1'b0;
    if (tx_from_cb) begin
      tx_data  = cb_data;
      tx_valid = cb_valid;
      tx_last  = cb_last;
      cb_ready = tx_ready;
    end
    cr_data  = rd_byte;
    cr_valid = (state == PLAY_CR);
    cr_last  = rd_last;
  end

  // store and capture header fields by byte position
  always_ff @(posedge clk) begin
    if (rx_fire && wr_cnt < AW'(MAX_FRAME)) buf_mem[wr_cnt] <= rx_data;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      wr_cnt <= '0;
      h_dst <= '0; h_src <= '0; h_type <= '0; h_proto <= '0; h_sport <= '0; h_dport <= '0;
      c_dst <= '0; c_src <= '0; c_port <= '0;
    end else if (rx_fire) begin
      wr_cnt <= rx_last ? '0 : ((wr_cnt < AW'(MAX_FRAME)) ? wr_cnt + 1'b1 : wr_cnt);
      if (wr_cnt < 6)                    h_dst   <= {h_dst[39:0], rx_data};
      else if (wr_cnt < 12)              h_src   <= {h_src[39:0], rx_data};
      else if (wr_cnt < 14)              h_type  <= {h_type[7:0], rx_data};
      if (wr_cnt >= 14 && wr_cnt < 20)   c_dst   <= {c_dst[39:0], rx_data};
      if (wr_cnt >= 20 && wr_cnt < 26)   c_src   <= {c_src[39:0], rx_data};
      if (wr_cnt >= 26 && wr_cnt < 28)   c_port  <= {c_port[7:0], rx_data};
      if (wr_cnt == 23)                  h_proto <= rx_data;
      if (wr_cnt >= 34 && wr_cnt < 36)   h_sport <= {h_sport[7:0], rx_data};
      if (wr_cnt >= 36 && wr_cnt < 38)   h_dport <= {h_dport[7:0], rx_data};
    end
  end

  wire is_cfg   = (h_dst == CFG_DST) && (h_src == CFG_SRC) && (h_type == CFG_TYPE) && (len >= AW'(28));
  wire is_match = configured && (h_type == 16'h0800) && (h_proto == 8'd6) &&
                  (h_dst == cfg_dst) && (h_src == cfg_src) &&
                  ((CHECK_DST_PORT ? h_dport : h_sport) == cfg_port) && (len > AW'(54));

  always_ff @(posedge clk) begin
    if (reset) begin
      state      <= RECV;
      len        <= '0;
      rd_ptr     <= '0;
      configured <= 1'b0;
      cfg_dst    <= '0;
      cfg_src    <= '0;
      cfg_port   <= '0;
      tx_from_cb <= 1'b0;
      last_class <= 2'd0;
    end else begin
      // return path owns the transmitter for whole frames, when no replay is due
      if (!tx_from_cb && (state == RECV || state == PLAY_CR) && cb_valid) tx_from_cb <= 1'b1;
      if (tx_from_cb && cb_valid && tx_ready && cb_last) tx_from_cb <= 1'b0;

      case (state)
        RECV: if (rx_fire && rx_last) begin
          len   <= (wr_cnt < AW'(MAX_FRAME)) ? wr_cnt + 1'b1 : wr_cnt;
          state <= DECIDE;
        end
        DECIDE: begin
          rd_ptr <= '0;
          if (is_cfg) begin
            cfg_dst    <= c_dst;
            cfg_src    <= c_src;
            cfg_port   <= c_port;
            configured <= 1'b1;
            last_class <= 2'd2;
            state      <= RECV;
          end else if (is_match) begin
            last_class <= 2'd1;
            state      <= PLAY_CR;
          end else if (!tx_from_cb) begin
            last_class <= 2'd0;
            state      <= PLAY_TX;
          end
        end
        PLAY_TX: if (tx_ready) begin
          rd_ptr <= rd_ptr + 1'b1;
          if (rd_last) state <= RECV;
        end
        PLAY_CR: if (cr_ready) begin
          rd_ptr <= rd_ptr + 1'b1;
          if (rd_last) state <= RECV;
        end
        default: state <= RECV;
      endcase
    end
  end
endmodule
