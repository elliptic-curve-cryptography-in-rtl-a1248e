// gf_divider_binary - GF(2^M) division z = g / h by the binary
// (shift-and-XOR extended Euclidean) algorithm.
//
// Registers u, v, g1, g2 start as u = h, v = F(x), g1 = g, g2 = 0 and keep
// the invariants g1*h = u*g and g2*h = v*g (mod F). Each clock does one step:
//   u even            : u = u/x,           g1 = g1/x mod F
//   v even            : v = v/x,           g2 = g2/x mod F
//   both odd, deg u > deg v : u = (u+v)/x, g1 = (g1+g2)/x mod F
//   both odd, otherwise     : v = (v+u)/x, g2 = (g2+g1)/x mod F
// until u or v reaches 1; the matching g register is then g/h. Dividing by x
// mod F is a shift right after adding F when the value is odd. Merging the
// addition with the following halving makes deg u + deg v fall by at least one
// every clock, so the quotient is found within 2M-1 steps. The result is then
// held back until exactly 2M cycles after start, so the latency does not
// depend on the operands (no timing leak of the key through the divider).
// The degree comparison is done with two magnitude comparators:
// deg u > deg v  <=>  u > v and (u xor v) > v.
//
// Interface: start (one cycle) samples g and h; done pulses for one cycle
// exactly 2M cycles after start, when z is valid; z holds until the next
// start. h = 0 gives z = 0.
// The 2M-cycle binary algorithm is the design's; the exact step order and the
// merged add-and-halve are this implementation's choices; the fixed 2M-cycle
// latency matches the division time the design reports.
module gf_divider_binary
  import gf_pkg::*;
#(
  parameter int M = 163
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [M-1:0] g,
  input  logic [M-1:0] h,
  output logic [M-1:0] z,
  output logic         done
);
  localparam logic [M:0] FPOLY = {1'b1, M'(field_poly_low(M))};
  localparam logic [M:0] ONE   = (M + 1)'(1);
  localparam int         CW    = $clog2(2 * M + 1);

  logic [M:0] u_q, v_q, u_n, v_n;
  logic [M:0] g1_q, g2_q, g1_n, g2_n;
  logic       busy, found;
  logic [CW-1:0] cnt;

  function automatic logic [M:0] half(input logic [M:0] p);
    logic [M:0] q;
    q = p[0] ? (p ^ FPOLY) : p;
    return q >> 1;
  endfunction

  always_comb begin
    u_n  = u_q;
    v_n  = v_q;
    g1_n = g1_q;
    g2_n = g2_q;
    if (!u_q[0]) begin
      u_n  = u_q >> 1;
      g1_n = half(g1_q);
    end else if (!v_q[0]) begin
      v_n  = v_q >> 1;
      g2_n = half(g2_q);
    end else if ((u_q > v_q) && ((u_q ^ v_q) > v_q)) begin
      u_n  = (u_q ^ v_q) >> 1;
      g1_n = half(g1_q ^ g2_q);
    end else begin
      v_n  = (v_q ^ u_q) >> 1;
      g2_n = half(g2_q ^ g1_q);
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      u_q   <= '0;
      v_q   <= '0;
      g1_q  <= '0;
      g2_q  <= '0;
      z     <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      found <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        u_q   <= (M + 1)'(h);
        v_q   <= FPOLY;
        g1_q  <= (M + 1)'(g);
        g2_q  <= '0;
        cnt   <= CW'(1);
        busy  <= 1'b1;
        found <= (h == M'(1)) || (h == '0);
        z     <= (h == M'(1)) ? g : '0;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        if (!found) begin
          u_q  <= u_n;
          v_q  <= v_n;
          g1_q <= g1_n;
          g2_q <= g2_n;
          if (u_n == ONE || v_n == ONE) begin
            z     <= (u_n == ONE) ? g1_n[M-1:0] : g2_n[M-1:0];
            found <= 1'b1;
          end
        end
        if (cnt == CW'(2 * M - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
