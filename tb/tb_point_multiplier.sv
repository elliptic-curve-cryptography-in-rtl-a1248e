// tb_point_multiplier - self-checking test of the tau-adic point multiplier at
// M = 163, D = 8. Scalars: 0, 1, a single top digit, all ones and random
// values; P is the generator or a random curve point. Results are compared
// with the reference model and checked to lie on the curve. Timing: each run
// must take M+1 cycles plus at most 352 cycles per non-zero digit, and the
// average over the random scalars is compared with the 29,463 cycles the
// design reports for M = 163, 8 bits per clock (within 10 %).
module tb_point_multiplier;
  import tb_ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic start, done;
  logic [162:0] xP, yP, k, xQ, yQ;
  point_multiplier dut (.clk, .reset, .start, .xP, .yP, .k, .xQ, .yQ, .done);

  int cyc = 0;
  longint rand_cycles = 0;
  int nrand = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fe_t vk, pt_t p, bit is_rand);
    int t0, lat;
    pt_t e, got;
    xP = 163'(p.x); yP = 163'(p.y); k = 163'(vk);
    @(negedge clk) start = 1;
    @(posedge clk) t0 = cyc;
    @(negedge clk) start = 0;
    do @(posedge clk); while (!done);
    lat = cyc - t0;
    e = tmul(vk, p, 163);
    got.x = fe_t'(xQ); got.y = fe_t'(yQ);
    checks++;
    if (got != e) begin failures++; $display("FAIL k=%h", vk); end
    checks++;
    if (!on_curve(got, 163) && got != '0) begin failures++; $display("FAIL result off curve"); end
    checks++;
    if (lat > 164 + 352 * $countones(k)) begin failures++; $display("FAIL latency %0d", lat); end
    if (is_rand) begin rand_cycles += lat; nrand++; end
  endtask

  initial begin
    pt_t g, p;
    real avg;
    g = gen163();
    start = 0; xP = '0; yP = '0; k = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    run('0, g, 0);
    run(fe_t'(1), g, 0);
    run(fe_t'(1) << 162, g, 0);
    run(mask(163), g, 0);
    p = tmul(rand_fe(163), g, 163);
    for (int i = 0; i < 4; i++) run(rand_fe(163), (i % 2) ? p : g, 1);
    avg = real'(rand_cycles) / nrand;
    $display("average point multiplication: %0.1f cycles", avg);
    checks++;
    if (avg < 0.9 * 29463.0 || avg > 1.1 * 29463.0) begin failures++; $display("FAIL average cycles"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
