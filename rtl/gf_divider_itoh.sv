// gf_divider_itoh - GF(2^M) division z = g / h through an Itoh-Tsujii
// inversion built from squarings and a few multiplications.
//
// With B_e = h^(2^e - 1), an addition chain e_0 = 1, e_i = e_j + e_l reaches
// e = M-1 in 9 to 12 steps (gf_pkg::itoh_step), each step being
//   B_i = B_j * (B_l)^(2^s)   with s = e_j.
// Then h^-1 = (B_last)^2 and z = g * h^-1. The datapath is one combinational
// gf_squarer used once per clock on a working register T, one gf_multiplier
// (D bits per clock), and a register file B[0..steps].
//
// Timing: start samples g and h. Per chain step the core spends s squaring
// cycles (the multiplication is launched in the last of them), then
// ceil(M/D) multiplier cycles plus one cycle to store the result. The final
// squaring and the multiplication by g add 2 + ceil(M/D) cycles. done pulses
// for one cycle; z holds until the next start. h = 0 yields z = 0.
// The chains and the square-then-multiply structure follow the design; the
// extra final squaring (the chains stop at h^(2^(M-1)-1), one squaring short
// of the inverse), the multiplication by g and the state machine are this
// implementation's.
module gf_divider_itoh
  import gf_pkg::*;
#(
  parameter int M = 163,
  parameter int D = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [M-1:0] g,
  input  logic [M-1:0] h,
  output logic [M-1:0] z,
  output logic         done
);
  localparam int NS = itoh_steps(M);

  typedef enum logic [2:0] {IDLE, SQ, MWAIT, FSQ, FWAIT} state_t;
  state_t state;

  logic [M-1:0] bq [0:NS];
  logic [M-1:0] t_q, g_q, t_sq;
  logic [3:0]   step;
  logic [8:0]   sq_left;
  itoh_step_t   cur, nxt;

  logic         m_start, m_done;
  logic [M-1:0] m_a, m_b, m_z;

  gf_squarer   #(.M(M))         u_sq  (.a(t_q), .c(t_sq));
  gf_multiplier #(.M(M), .D(D)) u_mul (.clk(clk), .reset(reset), .start(m_start),
                                       .a(m_a), .b(m_b), .z(m_z), .done(m_done));

  always_comb begin
    cur = itoh_step(M, int'(step));
    nxt = itoh_step(M, int'(step) + 1);
  end

  // Launch the multiplier in the cycle of the last squaring of a step, and
  // in the cycle after the final squaring.
  always_comb begin
    m_start = 1'b0;
    m_a     = t_sq;
    m_b     = bq[cur.j];
    if (state == SQ && sq_left == 9'd1) m_start = 1'b1;
    if (state == FSQ) begin
      m_start = 1'b1;
      m_a     = t_sq;
      m_b     = g_q;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state   <= IDLE;
      t_q     <= '0;
      g_q     <= '0;
      step    <= '0;
      sq_left <= '0;
      z       <= '0;
      done    <= 1'b0;
      for (int i = 0; i <= NS; i++) bq[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        if (h == '0) begin
          z     <= '0;
          done  <= 1'b1;
          state <= IDLE;
        end else begin
          bq[0]   <= h;
          g_q     <= g;
          t_q     <= h;                       // step 1 squares B_0
          step    <= 4'd1;
          sq_left <= itoh_step(M, 1).s;
          state   <= SQ;
        end
      end else begin
        case (state)
          SQ: begin
            t_q     <= t_sq;
            sq_left <= sq_left - 1'b1;
            if (sq_left == 9'd1) state <= MWAIT;
          end
          MWAIT: if (m_done) begin
            bq[step] <= m_z;
            if (int'(step) == NS) begin
              t_q   <= m_z;
              state <= FSQ;
            end else begin
              t_q     <= (int'(nxt.l) == int'(step)) ? m_z : bq[nxt.l];
              sq_left <= nxt.s;
              step    <= step + 1'b1;
              state   <= SQ;
            end
          end
          FSQ: state <= FWAIT;                 // multiplier launched with (B_last)^2 * g
          FWAIT: if (m_done) begin
            z     <= m_z;
            done  <= 1'b1;
            state <= IDLE;
          end
          default: state <= IDLE;
        endcase
      end
    end
  end
endmodule
