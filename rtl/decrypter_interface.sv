// decrypter_interface - rebuilds the original frame from the two frames made
// by encrypter_interface, using the ECC decrypter.
//
// Frames arrive as byte streams (valid/ready/last) in pairs:
//     frame 1: header (54 bytes) + C1            (CT_BYTES = ceil(2M/8) bytes)
//     frame 2: header + C2 of every block        (CT_BYTES each)
// A point is read as {zero padding, x, y}, most significant byte first. The
// C1 of frame 1 is kept; the header and up to MAX_BLK ciphertext blocks of
// frame 2 are stored (a trailing partial block is ignored). Each block is then
// decrypted, the first with a full decryption and the others with
// dec_reuse_k = 1 (same C1). A decrypted block is
//     { size (SW bits), data (8*BLK_BYTES bits, first byte most significant),
//       zero padding }
// (SW = 6, BLK_BYTES = 40 for M = 163) and its first `size` bytes (at most
// BLK_BYTES) are appended to the output.
// Finally the header of frame 2 followed by the recovered data is sent.
//
// Timing: input at one byte per clock; per block one decryption plus
// BLK_BYTES + 1 cycles to unpack; output at one byte per clock while
// out_ready is high. The frame after a frame 2 is again taken as a frame 1.
// The block format follows the design; pairing frames by arrival order and
// the byte order are this implementation's choices.
module decrypter_interface
  import gf_pkg::*;
#(
  parameter int M        = 163,
  parameter int MAX_DATA = 1400
) (
  input  logic           clk,
  input  logic           reset,
  // encrypted frames
  input  logic [7:0]     in_data,
  input  logic           in_valid,
  input  logic           in_last,
  output logic           in_ready,
  // recovered frame
  output logic [7:0]     out_data,
  output logic           out_valid,
  output logic           out_last,
  input  logic           out_ready,
  // ECC decrypter
  output logic           dec_start,
  output logic           dec_reuse_k,
  output logic [M-1:0]   dec_xC1,
  output logic [M-1:0]   dec_yC1,
  output logic [M-1:0]   dec_xC2,
  output logic [M-1:0]   dec_yC2,
  input  logic [2*M-1:0] dec_data_out,
  input  logic           dec_done
);
  localparam int HDR       = 54;
  localparam int SW        = blk_size_bits(M);   // size field width
  localparam int BLK_BYTES = blk_bytes(M);
  localparam int CT_BYTES  = (2 * M + 7) / 8;
  localparam int MAX_BLK   = (MAX_DATA + BLK_BYTES - 1) / BLK_BYTES;
  localparam int OMAX      = MAX_BLK * BLK_BYTES;
  localparam int OW        = $clog2(OMAX + 1);
  localparam int CW        = $clog2(HDR + OMAX + 2);
  localparam int BW        = $clog2(MAX_BLK + 1);
  localparam int KW        = $clog2(CT_BYTES + 1);

  typedef enum logic [2:0] {RECV1, RECV2, DEC, DWAIT, UNLOAD, SEND} state_t;
  state_t state;

  logic [7:0]       hdr  [0:HDR-1];
  logic [7:0]       obuf [0:OMAX-1];
  logic [2*M-1:0]   c2buf [0:MAX_BLK-1];
  logic [2*M-1:0]   c1_q;
  logic [2*M-9:0]   sr;
  logic [CW-1:0]    cnt;
  logic [OW-1:0]    olen;
  logic [BW-1:0]    blk, nblk;
  logic [KW-1:0]    bi;
  logic [SW-1:0]    bsize;
  logic [8*BLK_BYTES-1:0] bdata;

  assign in_ready = (state == RECV1) || (state == RECV2);
  wire   in_fire  = in_valid && in_ready;
  wire   hdr_byte = (cnt < CW'(HDR));
  wire [2*M-1:0] sr_next = {sr, in_data};

  always_ff @(posedge clk) begin
    if (in_fire && state == RECV2 && hdr_byte) hdr[cnt[$clog2(HDR)-1:0]] <= in_data;
    if (in_fire && !hdr_byte && bi == KW'(CT_BYTES - 1) && state == RECV2 &&
        nblk < BW'(MAX_BLK))
      c2buf[nblk] <= sr_next[2*M-1:0];
    if (state == UNLOAD && SW'(bi) < bsize) obuf[olen] <= bdata[8*BLK_BYTES-1 -: 8];
  end

  assign dec_start   = (state == DEC) && (nblk != '0);
  assign dec_reuse_k = (blk != '0);
  assign dec_xC1     = c1_q[2*M-1:M];
  assign dec_yC1     = c1_q[M-1:0];
  assign dec_xC2     = c2buf[blk][2*M-1:M];
  assign dec_yC2     = c2buf[blk][M-1:0];

  always_comb begin
    out_valid = (state == SEND);
    out_data  = hdr_byte ? hdr[cnt[$clog2(HDR)-1:0]] : obuf[OW'(cnt - CW'(HDR))];
    out_last  = (cnt == CW'(HDR) + CW'(olen) - 1'b1);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= RECV1;
      cnt   <= '0;
      olen  <= '0;
      blk   <= '0;
      nblk  <= '0;
      bi    <= '0;
      bsize <= '0;
      bdata <= '0;
      c1_q  <= '0;
      sr    <= '0;
    end else begin
      case (state)
        RECV1, RECV2: if (in_fire) begin
          cnt <= (cnt == CW'(HDR)) ? cnt : cnt + 1'b1;
          if (!hdr_byte) begin
            sr <= sr_next[2*M-9:0];
            bi <= (bi == KW'(CT_BYTES - 1)) ? '0 : bi + 1'b1;
            if (bi == KW'(CT_BYTES - 1)) begin
              if (state == RECV1) c1_q <= sr_next[2*M-1:0];
              else if (nblk < BW'(MAX_BLK)) nblk <= nblk + 1'b1;
            end
          end
          if (in_last) begin
            cnt   <= '0;
            bi    <= '0;
            blk   <= '0;
            olen  <= '0;
            state <= (state == RECV1) ? RECV2 : DEC;
          end
        end
        DEC: state <= (nblk == '0) ? SEND : DWAIT;
        DWAIT: if (dec_done) begin
          bsize <= (dec_data_out[2*M-1 -: SW] > SW'(BLK_BYTES)) ? SW'(BLK_BYTES)
                                                             : dec_data_out[2*M-1 -: SW];
          bdata <= dec_data_out[2*M-1-SW -: 8*BLK_BYTES];
          bi    <= '0;
          state <= UNLOAD;
        end
        UNLOAD: begin                     // one byte per cycle into the output
          if (SW'(bi) < bsize) olen <= olen + 1'b1;
          bdata <= bdata << 8;
          bi    <= bi + 1'b1;
          if (bi == KW'(BLK_BYTES - 1)) begin
            if (blk == nblk - 1'b1) state <= SEND;
            else begin
              blk   <= blk + 1'b1;
              state <= DEC;
            end
          end
        end
        SEND: if (out_ready) begin
          cnt <= cnt + 1'b1;
          if (out_last) begin
            state <= RECV1;
            cnt   <= '0;
            bi    <= '0;
            nblk  <= '0;
          end
        end
        default: state <= RECV1;
      endcase
    end
  end
endmodule
