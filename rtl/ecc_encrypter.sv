// ecc_encrypter - El Gamal encryption of a 2M-bit block on a Koblitz curve.
//
// For public key Q and a per-message scalar k:
//     C1 = k * G,   S = k * Q,   C2 = data + S
// where data = {x, y} (upper M bits, lower M bits) is added to S with the
// affine point-addition formulas. The two point multiplications run in
// parallel on two point_multipliers; one point_adder then forms C2.
//
// The scalar k comes from a simple deterministic generator: after reset it is
// the constant K_SEED, and after every full encryption it becomes the x
// coordinate of the k * Q just computed. This is not a secure random source,
// but it is the generator the design uses.
//
// reuse_k (sampled with start) encrypts another block of the same message
// with the same k: C1 and S are kept from the previous encryption and only the
// point addition runs, so the receiver needs C1 once per message.
//
// Timing: start samples reuse_k, xQ, yQ and data_in. Full encryption: one
// point multiplication (the slower of the two) + one point addition + about
// 3 cycles. Reuse: one point addition + 2 cycles. done pulses for one cycle;
// the outputs hold until the next start.
// The two-multiplier/one-adder structure, the seed-then-x(kQ) generator and
// the reuse of C1 follow the design; the seed value, reuse_k and the control
// sequence are this implementation's.
module ecc_encrypter
  import gf_pkg::*;
#(
  parameter int           M      = 163,
  parameter int           D      = 8,
  parameter logic [M-1:0] K_SEED = M'(163'h5A3C_96E1_0F2D_4B78_C3A5_1E69_D287_4F0B_36C9_AE15)
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           start,
  input  logic           reuse_k,
  input  logic [M-1:0]   xQ,
  input  logic [M-1:0]   yQ,
  input  logic [2*M-1:0] data_in,
  output logic [M-1:0]   xC1,
  output logic [M-1:0]   yC1,
  output logic [M-1:0]   xC2,
  output logic [M-1:0]   yC2,
  output logic           done
);
  localparam logic [M-1:0] GX = M'(gen_x(M));
  localparam logic [M-1:0] GY = M'(gen_y(M));

  typedef enum logic [1:0] {IDLE, PMW, ADDS, ADDW} state_t;
  state_t state;

  logic [M-1:0] k_q, sx_q, sy_q, dx_q, dy_q;
  logic         pm1_ok, pm2_ok;

  logic         pm_start, pm1_done, pm2_done;
  logic [M-1:0] pm1_x, pm1_y, pm2_x, pm2_y;
  assign pm_start = start && !reuse_k;

  point_multiplier #(.M(M), .D(D)) u_pm_c1 (.clk, .reset, .start(pm_start), .xP(GX), .yP(GY),
                                            .k(k_q), .xQ(pm1_x), .yQ(pm1_y), .done(pm1_done));
  point_multiplier #(.M(M), .D(D)) u_pm_s  (.clk, .reset, .start(pm_start), .xP(xQ), .yP(yQ),
                                            .k(k_q), .xQ(pm2_x), .yQ(pm2_y), .done(pm2_done));

  logic         a_done;
  logic [M-1:0] a_x3, a_y3;
  point_adder #(.M(M), .D(D)) u_add (.clk, .reset, .start(state == ADDS),
                                     .x1(dx_q), .y1(dy_q), .x2(sx_q), .y2(sy_q),
                                     .x3(a_x3), .y3(a_y3), .done(a_done));

  always_ff @(posedge clk) begin
    if (reset) begin
      state  <= IDLE;
      k_q    <= K_SEED;
      sx_q   <= '0;
      sy_q   <= '0;
      dx_q   <= '0;
      dy_q   <= '0;
      pm1_ok <= 1'b0;
      pm2_ok <= 1'b0;
      xC1    <= '0;
      yC1    <= '0;
      xC2    <= '0;
      yC2    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        dx_q   <= data_in[2*M-1:M];
        dy_q   <= data_in[M-1:0];
        pm1_ok <= 1'b0;
        pm2_ok <= 1'b0;
        state  <= reuse_k ? ADDS : PMW;
      end else begin
        case (state)
          PMW: begin
            if (pm1_done) begin
              xC1    <= pm1_x;
              yC1    <= pm1_y;
              pm1_ok <= 1'b1;
            end
            if (pm2_done) begin
              sx_q   <= pm2_x;
              sy_q   <= pm2_y;
              pm2_ok <= 1'b1;
            end
            if ((pm1_ok || pm1_done) && (pm2_ok || pm2_done)) begin
              k_q   <= pm2_done ? pm2_x : sx_q;   // next scalar: x(k*Q)
              state <= ADDS;
            end
          end
          ADDS: state <= ADDW;
          ADDW: if (a_done) begin
            xC2   <= a_x3;
            yC2   <= a_y3;
            done  <= 1'b1;
            state <= IDLE;
          end
          default: state <= IDLE;
        endcase
      end
    end
  end
endmodule
