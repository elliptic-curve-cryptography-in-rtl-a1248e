// tb_key_generator - self-checking test of public-key generation at
// M = 163, D = 8: Q = d * G for a few private keys, compared with the
// reference model, checked to lie on the curve, and timed against
// M+1 cycles plus at most 352 cycles per non-zero digit of d.
module tb_key_generator;
  import tb_ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic start, done;
  logic [162:0] d, xQ, yQ;
  key_generator dut (.clk, .reset, .start, .d, .xQ, .yQ, .done);

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt_t e, got;
    fe_t vd;
    int t0, lat;
    start = 0; d = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int i = 0; i < 3; i++) begin
      vd = (i == 0) ? fe_t'(1) : rand_fe(163);
      d = 163'(vd);
      @(negedge clk) start = 1;
      @(posedge clk) t0 = cyc;
      @(negedge clk) start = 0;
      do @(posedge clk); while (!done);
      lat = cyc - t0;
      e = tmul(vd, gen163(), 163);
      got.x = fe_t'(xQ); got.y = fe_t'(yQ);
      checks++; if (got != e) begin failures++; $display("FAIL key %0d", i); end
      checks++; if (!on_curve(got, 163)) begin failures++; $display("FAIL off curve"); end
      checks++; if (lat > 164 + 352 * $countones(d)) begin failures++; $display("FAIL latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
