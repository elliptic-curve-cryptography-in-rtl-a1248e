// ecc_decrypter - El Gamal decryption of one 2M-bit block on a Koblitz curve.
//
// With private key d and ciphertext (C1, C2):
//     S = d * C1,   data = C2 - S = C2 + (-S),   -(x, y) = (x, x + y)
// One point_multiplier forms S, a point_negate flips it and one point_adder
// adds it to C2. data_out = {x, y} of the result (upper M bits = x).
// Because the encrypter added the data with the same affine formulas, the
// subtraction returns the original 2M data bits exactly, even though the data
// pair is not a curve point.
//
// reuse_k (sampled with start) keeps S = d * C1 from the previous operation
// and only runs the point addition: all blocks of one message share C1.
//
// Timing: start samples reuse_k, d, C1 and C2. Full decryption: one point
// multiplication + one point addition + about 3 cycles; reuse: one point
// addition + 2 cycles. done pulses for one cycle; data_out holds until the
// next start. Structure (multiplier, negate, adder) follows the design;
// reuse_k and the control sequence are this implementation's.
module ecc_decrypter
  import gf_pkg::*;
#(
  parameter int M = 163,
  parameter int D = 8
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           start,
  input  logic           reuse_k,
  input  logic [M-1:0]   d,
  input  logic [M-1:0]   xC1,
  input  logic [M-1:0]   yC1,
  input  logic [M-1:0]   xC2,
  input  logic [M-1:0]   yC2,
  output logic [2*M-1:0] data_out,
  output logic           done
);
  typedef enum logic [1:0] {IDLE, PMW, ADDS, ADDW} state_t;
  state_t state;

  logic [M-1:0] sx_q, sy_q, cx_q, cy_q, nx, ny;

  logic         pm_done;
  logic [M-1:0] pm_x, pm_y;
  point_multiplier #(.M(M), .D(D)) u_pm (.clk, .reset, .start(start && !reuse_k),
                                         .xP(xC1), .yP(yC1), .k(d),
                                         .xQ(pm_x), .yQ(pm_y), .done(pm_done));

  point_negate #(.M(M)) u_neg (.x1(sx_q), .y1(sy_q), .x3(nx), .y3(ny));

  logic         a_done;
  logic [M-1:0] a_x3, a_y3;
  point_adder #(.M(M), .D(D)) u_add (.clk, .reset, .start(state == ADDS),
                                     .x1(cx_q), .y1(cy_q), .x2(nx), .y2(ny),
                                     .x3(a_x3), .y3(a_y3), .done(a_done));

  always_ff @(posedge clk) begin
    if (reset) begin
      state    <= IDLE;
      sx_q     <= '0;
      sy_q     <= '0;
      cx_q     <= '0;
      cy_q     <= '0;
      data_out <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        cx_q  <= xC2;
        cy_q  <= yC2;
        state <= reuse_k ? ADDS : PMW;
      end else begin
        case (state)
          PMW: if (pm_done) begin
            sx_q  <= pm_x;
            sy_q  <= pm_y;
            state <= ADDS;
          end
          ADDS: state <= ADDW;
          ADDW: if (a_done) begin
            data_out <= {a_x3, a_y3};
            done     <= 1'b1;
            state    <= IDLE;
          end
          default: state <= IDLE;
        endcase
      end
    end
  end
endmodule
