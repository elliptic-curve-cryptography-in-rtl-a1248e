// tb_ecc_decrypter - self-checking test of the El Gamal decrypter at
// M = 163, D = 8. Ciphertexts are built with the reference model
// (C1 = k*G, C2 = data + k*(d*G)); the decrypter must return data, first with
// a full decryption and then, for a second block under the same C1, with
// reuse_k (one point addition, at most 355 cycles).
module tb_ecc_decrypter;
  import tb_ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic start, reuse_k, done;
  logic [162:0] d, xC1, yC1, xC2, yC2;
  logic [325:0] data_out;
  ecc_decrypter dut (.clk, .reset, .start, .reuse_k, .d, .xC1, .yC1, .xC2, .yC2, .data_out, .done);

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dec(bit reuse, pt_t c1, pt_t c2, pt_t exp_dat, string what);
    int t0, lat;
    xC1 = 163'(c1.x); yC1 = 163'(c1.y); xC2 = 163'(c2.x); yC2 = 163'(c2.y);
    reuse_k = reuse;
    @(negedge clk) start = 1;
    @(posedge clk) t0 = cyc;
    @(negedge clk) start = 0;
    do @(posedge clk); while (!done);
    lat = cyc - t0;
    checks++;
    if (data_out != {163'(exp_dat.x), 163'(exp_dat.y)}) begin failures++; $display("FAIL %s data", what); end
    checks++;
    if (reuse ? (lat > 355) : (lat > 164 + 352 * $countones(d) + 352 + 6)) begin
      failures++; $display("FAIL %s latency %0d", what, lat);
    end
    $display("%s: %0d cycles", what, lat);
  endtask

  initial begin
    pt_t g, q, c1, s, dat;
    fe_t vd, kk;
    g = gen163();
    vd = rand_fe(163);
    kk = rand_fe(163);
    q  = tmul(vd, g, 163);
    c1 = tmul(kk, g, 163);
    s  = tmul(kk, q, 163);
    start = 0; reuse_k = 0; d = 163'(vd);
    xC1 = '0; yC1 = '0; xC2 = '0; yC2 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    dat.x = rand_fe(163); dat.y = rand_fe(163);
    dec(0, c1, padd(dat, s, 163), dat, "full decryption");
    dat.x = rand_fe(163); dat.y = rand_fe(163);
    dec(1, c1, padd(dat, s, 163), dat, "reuse decryption");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
