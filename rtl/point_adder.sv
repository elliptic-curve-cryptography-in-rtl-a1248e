// point_adder - affine point addition on the Koblitz curve
// y^2 + xy = x^3 + a x^2 + 1 over GF(2^M), with (0,0) standing for the point
// at infinity.
//
// All five cases are handled:
//   1/2. one operand is (0,0)        -> the other operand
//   3.   x1 = x2, y1 != y2           -> (0,0)
//   4.   general addition:  L = (y1+y2)/(x1+x2),
//        x3 = L^2 + L + x1 + x2 + a,  y3 = L(x1+x3) + x3 + y1
//   5.   doubling (P1 = P2, x1 != 0): L = x1 + y1/x1,
//        x3 = L^2 + L + a,            y3 = x1^2 + L*x3 + x3
// Doubling a point with x1 = 0 (a point of order two) also returns (0,0).
// Datapath: one gf_divider, one gf_multiplier and two combinational
// gf_squarers (for L^2 and x1^2).
//
// Timing: start samples the four coordinates and, for cases 4 and 5, launches
// the division in the same cycle. L is stored with the divider's done, the
// next cycle stores x3 and launches the multiplication, and y3 is stored when
// the multiplier finishes: about divider + multiplier + 2 cycles. Cases 1-3 finish one cycle after start. done pulses
// for one cycle; x3/y3 hold until the next start.
// The five rules and the divider/multiplier/two-squarer make-up follow the
// design; the state sequence and the x1 = 0 doubling rule are this
// implementation's.
module point_adder
  import gf_pkg::*;
#(
  parameter int M = 163,
  parameter int D = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [M-1:0] x1,
  input  logic [M-1:0] y1,
  input  logic [M-1:0] x2,
  input  logic [M-1:0] y2,
  output logic [M-1:0] x3,
  output logic [M-1:0] y3,
  output logic         done
);
  localparam logic [M-1:0] A_COEF = M'(curve_a(M));

  typedef enum logic [1:0] {IDLE, DIVW, X3, MULW} state_t;
  state_t state;

  logic [M-1:0] x1_q, y1_q, x2_q, lam_q;
  logic         dbl_q;

  // case decode on the inputs
  logic p1_inf, p2_inf, same_x, same_y, trivial, is_dbl;
  always_comb begin
    p1_inf  = (x1 == '0) && (y1 == '0);
    p2_inf  = (x2 == '0) && (y2 == '0);
    same_x  = (x1 == x2);
    same_y  = (y1 == y2);
    trivial = p1_inf || p2_inf || (same_x && !same_y) || (same_x && same_y && x1 == '0);
    is_dbl  = same_x && same_y;
  end

  // divider: launched directly from the inputs
  logic         d_start, d_done;
  logic [M-1:0] d_g, d_h, d_z;
  assign d_start = start && !trivial;
  assign d_g     = is_dbl ? y1 : (y1 ^ y2);
  assign d_h     = is_dbl ? x1 : (x1 ^ x2);
  gf_divider #(.M(M), .D(D)) u_div (.clk, .reset, .start(d_start), .g(d_g), .h(d_h),
                                    .z(d_z), .done(d_done));

  // squarers
  logic [M-1:0] lam_sq, x1_sq, x3_c;
  gf_squarer #(.M(M)) u_sq_l (.a(lam_q), .c(lam_sq));
  gf_squarer #(.M(M)) u_sq_x (.a(x1_q),  .c(x1_sq));

  assign x3_c = dbl_q ? (lam_sq ^ lam_q ^ A_COEF)
                      : (lam_sq ^ lam_q ^ x1_q ^ x2_q ^ A_COEF);

  // multiplier: L * x3 (doubling) or L * (x1 + x3)
  logic         m_start, m_done;
  logic [M-1:0] m_z;
  assign m_start = (state == X3);
  gf_multiplier #(.M(M), .D(D)) u_mul (.clk, .reset, .start(m_start), .a(lam_q),
                                       .b(dbl_q ? x3_c : (x1_q ^ x3_c)), .z(m_z), .done(m_done));

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= IDLE;
      x1_q  <= '0;
      y1_q  <= '0;
      x2_q  <= '0;
      dbl_q <= 1'b0;
      x3    <= '0;
      y3    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        x1_q  <= x1;
        y1_q  <= y1;
        x2_q  <= x2;
        dbl_q <= is_dbl;
        if (trivial) begin
          if (p1_inf) begin
            x3 <= x2;
            y3 <= y2;
          end else if (p2_inf) begin
            x3 <= x1;
            y3 <= y1;
          end else begin
            x3 <= '0;
            y3 <= '0;
          end
          done  <= 1'b1;
          state <= IDLE;
        end else begin
          state <= DIVW;
        end
      end else begin
        case (state)
          DIVW: if (d_done) state <= X3;
          X3: begin
            x3    <= x3_c;
            state <= MULW;
          end
          MULW: if (m_done) begin
            y3    <= m_z ^ x3 ^ (dbl_q ? x1_sq : y1_q);
            done  <= 1'b1;
            state <= IDLE;
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

  // lambda register: quotient (+ x1 when doubling)
  always_ff @(posedge clk) begin
    if (reset) lam_q <= '0;
    else if (state == DIVW && d_done) lam_q <= d_z ^ (dbl_q ? x1_q : '0);
  end
endmodule
