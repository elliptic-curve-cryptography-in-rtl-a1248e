// point_multiplier - scalar multiplication Q = k * P on a Koblitz curve by
// the tau-adic (Frobenius) method.
//
// On a Koblitz curve the Frobenius map tau(x, y) = (x^2, y^2) is a group
// endomorphism that costs only two squarings. The M bits of k are read as
// tau-adic digits k_i in {0, 1}, and
//     Q = sum_i k_i * tau^i(P)
// is evaluated Horner-style from the most significant digit:
//     Q = O;  for i = M-1 .. 0:  Q = tau(Q);  if (k_i) Q = Q + P
// The two gf_squarers apply tau in one clock; additions use a point_adder
// (divider + multiplier + two squarers). The point at infinity O is (0,0).
// Because these tau-adic multipliers commute, (d * (k * G)) = (k * (d * G)),
// which is all the El Gamal encrypter and decrypter need. Converting an
// ordinary integer into this digit form is not part of the core.
//
// Timing: start samples xP, yP and k. Each digit costs one cycle for tau,
// and a digit equal to 1 adds one point addition (roughly one division plus
// one multiplication). Total: M + (number of 1 digits) * (adder latency + 1)
// cycles. done pulses for one cycle; xQ/yQ hold until the next start.
// The tau-adic method and the adder-plus-two-squarers make-up follow the
// design; the digit convention and the state machine are this
// implementation's.
module point_multiplier
  import gf_pkg::*;
#(
  parameter int M = 163,
  parameter int D = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [M-1:0] xP,
  input  logic [M-1:0] yP,
  input  logic [M-1:0] k,
  output logic [M-1:0] xQ,
  output logic [M-1:0] yQ,
  output logic         done
);
  localparam int CW = $clog2(M + 1);

  typedef enum logic [1:0] {IDLE, FROB, ADDW} state_t;
  state_t state;

  logic [M-1:0]  xp_q, yp_q, k_q;
  logic [CW-1:0] left;
  logic [M-1:0]  xf, yf;

  gf_squarer #(.M(M)) u_sqx (.a(xQ), .c(xf));
  gf_squarer #(.M(M)) u_sqy (.a(yQ), .c(yf));

  logic         a_start, a_done;
  logic [M-1:0] a_x3, a_y3;
  assign a_start = (state == FROB) && k_q[M-1];
  point_adder #(.M(M), .D(D)) u_add (.clk, .reset, .start(a_start),
                                     .x1(xf), .y1(yf), .x2(xp_q), .y2(yp_q),
                                     .x3(a_x3), .y3(a_y3), .done(a_done));

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= IDLE;
      xp_q  <= '0;
      yp_q  <= '0;
      k_q   <= '0;
      left  <= '0;
      xQ    <= '0;
      yQ    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        xp_q  <= xP;
        yp_q  <= yP;
        k_q   <= k;
        left  <= CW'(M);
        xQ    <= '0;
        yQ    <= '0;
        state <= FROB;
      end else begin
        case (state)
          FROB: begin
            k_q  <= k_q << 1;
            left <= left - 1'b1;
            if (k_q[M-1]) begin
              state <= ADDW;
            end else begin
              xQ <= xf;
              yQ <= yf;
              if (left == CW'(1)) begin
                done  <= 1'b1;
                state <= IDLE;
              end
            end
          end
          ADDW: if (a_done) begin
            xQ <= a_x3;
            yQ <= a_y3;
            if (left == '0) begin
              done  <= 1'b1;
              state <= IDLE;
            end else begin
              state <= FROB;
            end
          end
          default: state <= IDLE;
        endcase
      end
    end
  end
endmodule
