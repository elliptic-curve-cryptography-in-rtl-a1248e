// tb_point_adder - self-checking test of the point adder at M = 163, D = 8.
// Covers the five addition rules: O + O, O + P, P + O, P + (-P), P + P
// (doubling), the general case on random curve points, and one sum of two
// arbitrary (non-curve) pairs, all against the reference model. The general
// case must finish within the division bound 2M plus one multiplication
// (21 cycles) and a few control cycles; rules 1-3 within 2 cycles.
module tb_point_adder;
  import tb_ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic start, done;
  logic [162:0] x1, y1, x2, y2, x3, y3;
  point_adder dut (.clk, .reset, .start, .x1, .y1, .x2, .y2, .x3, .y3, .done);

  int cyc = 0, maxlat = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(pt_t p, pt_t q, int bound, string what);
    int t0, lat;
    pt_t e, got;
    x1 = 163'(p.x); y1 = 163'(p.y); x2 = 163'(q.x); y2 = 163'(q.y);
    @(negedge clk) start = 1;
    @(posedge clk) t0 = cyc;
    @(negedge clk) start = 0;
    do @(posedge clk); while (!done);
    lat = cyc - t0;
    if (lat > maxlat) maxlat = lat;
    e = padd(p, q, 163);
    got.x = fe_t'(x3); got.y = fe_t'(y3);
    checks++;
    if (got != e) begin failures++; $display("FAIL %s value", what); end
    checks++;
    if (lat > bound) begin failures++; $display("FAIL %s latency %0d > %0d", what, lat, bound); end
  endtask

  initial begin
    pt_t p, q, o, r;
    o = '0;
    start = 0; x1 = '0; y1 = '0; x2 = '0; y2 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    p = tmul(rand_fe(163), gen163(), 163);
    q = tmul(rand_fe(163), gen163(), 163);
    run(o, o, 2, "O+O");
    run(o, p, 2, "O+P");
    run(p, o, 2, "P+O");
    run(p, pneg(p), 2, "P-P");
    run(p, p, 326 + 21 + 4, "P+P");
    run(gen163(), gen163(), 326 + 21 + 4, "G+G");
    run(p, q, 326 + 21 + 4, "P+Q");
    r.x = rand_fe(163); r.y = rand_fe(163);
    run(r, q, 326 + 21 + 4, "data+Q");
    for (int i = 0; i < 12; i++) begin
      p = tmul(rand_fe(163), gen163(), 163);
      q = tmul(rand_fe(163), gen163(), 163);
      run(p, q, 326 + 21 + 4, "random");
      checks++;
      if (!on_curve({fe_t'(x3), fe_t'(y3)}, 163)) begin failures++; $display("FAIL sum not on curve"); end
    end
    $display("longest addition: %0d cycles", maxlat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
