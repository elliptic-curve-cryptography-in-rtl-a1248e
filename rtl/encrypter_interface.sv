// encrypter_interface - turns one selected Ethernet frame into two encrypted
// frames using the ECC encrypter.
//
// The incoming frame (byte stream, valid/ready/last) is split into the
// 54-byte header (Ethernet 14 + IPv4 20 + TCP 20) and its TCP data, of which
// at most MAX_DATA = 1400 bytes are kept. The data is cut into blocks of
// BLK_BYTES bytes; each block is encrypted as the 2M-bit word
//     { size (SW bits), data (8*BLK_BYTES bits, first byte most significant),
//       zero padding }
// with SW = 6 and BLK_BYTES = 40 for M = 163 (gf_pkg::blk_size_bits and
// blk_bytes give the widths for the larger curves).
// where size is the number of valid bytes. The first block gets a full
// encryption (new scalar, C1 and C2); all further blocks reuse the same scalar
// so only C2 is computed (enc_reuse_k = 1). Two frames are then sent:
//     frame 1: header + C1                      (CT_BYTES = ceil(2M/8) bytes)
//     frame 2: header + C2 of every block       (CT_BYTES each)
// A point is serialised as {zero padding, x, y}, most significant byte first.
// For M = 163 a 1400-byte frame gives 35 blocks and a 1435-byte frame 2.
//
// Timing: the frame is taken in at one byte per clock; each block then costs
// BLK_BYTES + 2 cycles to assemble plus one encryption; both frames leave at
// one byte per clock when out_ready is high. The header is copied unchanged.
// Block size and size field for M = 163, shared C1 and the two-frame format
// follow the design; the size field widths for larger M, the byte order, the
// padding and the unchanged header are this implementation's choices.
module encrypter_interface
  import gf_pkg::*;
#(
  parameter int M        = 163,
  parameter int MAX_DATA = 1400
) (
  input  logic           clk,
  input  logic           reset,
  // frame to encrypt
  input  logic [7:0]     in_data,
  input  logic           in_valid,
  input  logic           in_last,
  output logic           in_ready,
  // encrypted frames
  output logic [7:0]     out_data,
  output logic           out_valid,
  output logic           out_last,
  input  logic           out_ready,
  // ECC encrypter
  output logic           enc_start,
  output logic           enc_reuse_k,
  output logic [2*M-1:0] enc_data_in,
  input  logic [M-1:0]   enc_xC1,
  input  logic [M-1:0]   enc_yC1,
  input  logic [M-1:0]   enc_xC2,
  input  logic [M-1:0]   enc_yC2,
  input  logic           enc_done
);
  localparam int HDR       = 54;
  localparam int SW        = blk_size_bits(M);   // size field width
  localparam int BLK_BYTES = blk_bytes(M);
  localparam int CT_BYTES  = (2 * M + 7) / 8;
  localparam int CTW       = 8 * CT_BYTES;
  localparam int MAX_BLK   = (MAX_DATA + BLK_BYTES - 1) / BLK_BYTES;
  localparam int DW        = $clog2(MAX_DATA + 1);
  localparam int CW        = $clog2(HDR + MAX_DATA + 2);
  localparam int BW        = $clog2(MAX_BLK + 1);
  localparam int KW        = $clog2(CT_BYTES + 1);

  typedef enum logic [2:0] {RECV, LOAD, ENC, EWAIT, SEND1, SEND2} state_t;
  state_t state;

  logic [7:0]       hdr  [0:HDR-1];
  logic [7:0]       dbuf [0:MAX_DATA-1];
  logic [2*M-1:0]   c2buf [0:MAX_BLK-1];
  logic [2*M-1:0]   c1_q;
  logic [CW-1:0]    cnt;
  logic [DW-1:0]    dlen, rd;
  logic [BW-1:0]    blk, nblk;
  logic [KW-1:0]    bi;           // byte index inside a block / ciphertext
  logic [SW-1:0]    bsize;
  logic [8*BLK_BYTES-1:0] bdata;
  logic [CTW-1:0]   ct_sr;        // ciphertext being sent, shifted out MSB first

  function automatic logic [BW-1:0] nblocks(int len);
    return BW'((len == 0) ? 1 : (len + BLK_BYTES - 1) / BLK_BYTES);
  endfunction

  assign in_ready = (state == RECV);
  wire   in_fire  = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (in_fire && cnt < CW'(HDR)) hdr[cnt[$clog2(HDR)-1:0]] <= in_data;
    if (in_fire && cnt >= CW'(HDR) && dlen < DW'(MAX_DATA)) dbuf[dlen] <= in_data;
  end

  // block word: {size, data, padding}
  always_comb begin
    enc_data_in = '0;
    enc_data_in[2*M-1 -: SW] = bsize;
    enc_data_in[2*M-1-SW -: 8*BLK_BYTES] = bdata;
  end
  assign enc_start   = (state == ENC);
  assign enc_reuse_k = (blk != '0);

  // output byte
  always_comb begin
    out_valid = (state == SEND1) || (state == SEND2);
    out_data  = (cnt < CW'(HDR)) ? hdr[cnt[$clog2(HDR)-1:0]] : ct_sr[CTW-1 -: 8];
    out_last  = (cnt >= CW'(HDR)) && (bi == KW'(CT_BYTES - 1)) &&
                ((state == SEND1) || (blk == nblk - 1'b1));
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= RECV;
      cnt   <= '0;
      dlen  <= '0;
      rd    <= '0;
      blk   <= '0;
      nblk  <= '0;
      bi    <= '0;
      bsize <= '0;
      bdata <= '0;
      c1_q  <= '0;
      ct_sr <= '0;
    end else begin
      case (state)
        RECV: if (in_fire) begin
          cnt <= cnt + 1'b1;
          if (cnt >= CW'(HDR) && dlen < DW'(MAX_DATA)) dlen <= dlen + 1'b1;
          if (in_last) begin
            state <= LOAD;
            blk   <= '0;
            rd    <= '0;
            bi    <= '0;
            // number of blocks, computed from the final data length
            // (at least one block, so an empty payload still gives a C2)
            nblk  <= nblocks((cnt >= CW'(HDR) && dlen < DW'(MAX_DATA)) ? int'(dlen) + 1
                                                                      : int'(dlen));
          end
        end
        LOAD: begin                       // one data byte per cycle into the block
          bdata <= {bdata[8*BLK_BYTES-9:0], (rd < dlen) ? dbuf[rd] : 8'h00};
          rd    <= rd + 1'b1;
          bi    <= bi + 1'b1;
          if (bi == KW'(BLK_BYTES - 1)) begin
            bsize <= SW'((int'(dlen) - BLK_BYTES * int'(blk) > BLK_BYTES) ? BLK_BYTES
                        : int'(dlen) - BLK_BYTES * int'(blk));
            state <= ENC;
          end
        end
        ENC: state <= EWAIT;
        EWAIT: if (enc_done) begin
          c2buf[blk] <= {enc_xC2, enc_yC2};
          if (blk == '0) c1_q <= {enc_xC1, enc_yC1};
          bi <= '0;
          if (blk == nblk - 1'b1) begin
            state <= SEND1;
            cnt   <= '0;
            ct_sr <= CTW'((blk == '0) ? {enc_xC1, enc_yC1} : c1_q);
          end else begin
            blk   <= blk + 1'b1;
            state <= LOAD;
          end
        end
        SEND1: if (out_ready) begin
          if (cnt < CW'(HDR)) cnt <= cnt + 1'b1;
          else begin
            ct_sr <= ct_sr << 8;
            bi    <= bi + 1'b1;
            if (bi == KW'(CT_BYTES - 1)) begin
              state <= SEND2;
              cnt   <= '0;
              bi    <= '0;
              blk   <= '0;
              ct_sr <= CTW'(c2buf[0]);
            end
          end
        end
        SEND2: if (out_ready) begin
          if (cnt < CW'(HDR)) cnt <= cnt + 1'b1;
          else begin
            ct_sr <= ct_sr << 8;
            bi    <= bi + 1'b1;
            if (bi == KW'(CT_BYTES - 1)) begin
              bi    <= '0;
              blk   <= blk + 1'b1;
              ct_sr <= CTW'(c2buf[(int'(blk) + 1) % MAX_BLK]);
              if (blk == nblk - 1'b1) begin
                state <= RECV;
                cnt   <= '0;
                dlen  <= '0;
              end
            end
          end
        end
        default: state <= RECV;
      endcase
    end
  end
endmodule
