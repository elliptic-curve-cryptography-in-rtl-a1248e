// gf_multiplier - digit-serial interleaved multiplier in GF(2^M).
//
// Computes Z = A * B mod F(x) in N = ceil(M/D) clock cycles, consuming D bits
// of B per cycle, least-significant digit first. Three parts work side by side:
//   * the A register holds A * x^(D*i) mod F(x); each cycle it is shifted
//     left by D and reduced,
//   * the B register hands out its lowest D bits and shifts right by D,
//   * the accumulator C (M+D-1 bits) XORs in digit_j ? (A << j) for
//     j = 0..D-1 (an AND/XOR array).
// After the last digit, C mod F(x) is formed combinationally and is Z. D is
// the speed/area knob: D = 1 gives a bit-serial multiplier taking M cycles,
// D = ceil(M/2) a two-cycle multiplier.
//
// Timing: start is sampled on a rising edge; that same edge accumulates the
// first digit straight from the a and b inputs. done is a one-cycle pulse N
// cycles after the start cycle, and z holds its value until the next start.
// A start while busy restarts the operation. Reset is synchronous, active high.
// The digit-serial interleaved structure and the N-cycle latency follow the
// design; the LSB-first digit order, the merged first cycle and the
// combinational final reduction are this implementation's choices.
module gf_multiplier
  import gf_pkg::*;
#(
  parameter int M = 163,
  parameter int D = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] z,
  output logic         done
);
  localparam int N  = (M + D - 1) / D;
  localparam int BW = N * D;
  localparam int CW = M + D - 1;
  localparam int NW = $clog2(N + 1);

  logic [M-1:0]  a_q, a_cur, a_nxt;
  logic [BW-1:0] b_q, b_cur;
  logic [CW-1:0] c_q, c_base, c_nxt;
  logic [D-1:0]  digit;
  logic [NW-1:0] cnt;
  logic          busy;

  always_comb begin
    a_cur  = start ? a : a_q;
    b_cur  = start ? BW'(b) : b_q;
    c_base = start ? '0 : c_q;
    digit  = b_cur[D-1:0];
    c_nxt  = c_base;
    for (int j = 0; j < D; j++)
      if (digit[j]) c_nxt ^= CW'(a_cur) << j;
  end

  // A * x^D mod F(x)
  gf_reduce #(.M(M), .IN_W(M + D)) u_ashift (.c({a_cur, {D{1'b0}}}), .z(a_nxt));
  // final reduction of the accumulator
  gf_reduce #(.M(M), .IN_W(CW)) u_cred (.c(c_q), .z(z));

  always_ff @(posedge clk) begin
    if (reset) begin
      a_q  <= '0;
      b_q  <= '0;
      c_q  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start || busy) begin
        a_q <= a_nxt;
        b_q <= b_cur >> D;
        c_q <= c_nxt;
        if (start) begin
          cnt  <= NW'(1);
          busy <= (N > 1);
          done <= (N == 1);
        end else begin
          cnt <= cnt + 1'b1;
          if (cnt == NW'(N - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end
endmodule
