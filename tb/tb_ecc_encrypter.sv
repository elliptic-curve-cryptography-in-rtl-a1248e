// tb_ecc_encrypter - self-checking test of the El Gamal encrypter at
// M = 163, D = 8 with a testbench-chosen seed scalar. Three operations:
//   1. full encryption with k = seed: C1 = k*G, C2 = data + k*Q
//   2. reuse_k encryption of a second block: same C1, C2 = data2 + k*Q,
//      only one point addition (at most 352 + 3 cycles)
//   3. full encryption with the next scalar k' = x(k*Q)
// Everything is compared with the reference model.
module tb_ecc_encrypter;
  import tb_ecc_ref_pkg::*;
  localparam logic [162:0] SEED = 163'h3_1415_9265_3589_7932_3846_2643_3832_7950_2884_1971;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic start, reuse_k, done;
  logic [162:0] xQ, yQ, xC1, yC1, xC2, yC2;
  logic [325:0] data_in;
  ecc_encrypter #(.K_SEED(SEED)) dut (.clk, .reset, .start, .reuse_k, .xQ, .yQ, .data_in,
                                      .xC1, .yC1, .xC2, .yC2, .done);

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic enc(bit reuse, pt_t dat, output int lat);
    int t0;
    data_in = {163'(dat.x), 163'(dat.y)};
    reuse_k = reuse;
    @(negedge clk) start = 1;
    @(posedge clk) t0 = cyc;
    @(negedge clk) start = 0;
    do @(posedge clk); while (!done);
    lat = cyc - t0;
  endtask

  task automatic expect_ct(pt_t c1, pt_t c2, string what);
    checks++;
    if (fe_t'(xC1) != c1.x || fe_t'(yC1) != c1.y) begin failures++; $display("FAIL %s C1", what); end
    checks++;
    if (fe_t'(xC2) != c2.x || fe_t'(yC2) != c2.y) begin failures++; $display("FAIL %s C2", what); end
  endtask

  initial begin
    pt_t g, q, s, dat, c1;
    fe_t kk;
    int lat;
    g = gen163();
    q = tmul(rand_fe(163), g, 163);
    start = 0; reuse_k = 0; data_in = '0;
    xQ = 163'(q.x); yQ = 163'(q.y);
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;

    kk = fe_t'(SEED);
    dat.x = rand_fe(163); dat.y = rand_fe(163);
    enc(0, dat, lat);
    c1 = tmul(kk, g, 163);
    s  = tmul(kk, q, 163);
    expect_ct(c1, padd(dat, s, 163), "full #1");
    checks++; if (lat > 164 + 352 * $countones(kk) + 352 + 6) begin failures++; $display("FAIL full latency %0d", lat); end
    $display("full encryption: %0d cycles", lat);

    dat.x = rand_fe(163); dat.y = rand_fe(163);
    enc(1, dat, lat);
    expect_ct(c1, padd(dat, s, 163), "reuse");
    checks++; if (lat > 355) begin failures++; $display("FAIL reuse latency %0d", lat); end
    $display("reuse encryption: %0d cycles", lat);

    kk = s.x;
    dat.x = rand_fe(163); dat.y = rand_fe(163);
    enc(0, dat, lat);
    c1 = tmul(kk, g, 163);
    s  = tmul(kk, q, 163);
    expect_ct(c1, padd(dat, s, 163), "full #2 (next k)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
