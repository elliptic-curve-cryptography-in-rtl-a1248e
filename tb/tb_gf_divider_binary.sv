// tb_gf_divider_binary - self-checking test of the binary divider (M = 163): exactly 2M = 326 cycles.
// Each quotient is compared with g * h^-1 from the reference model (Fermat
// inversion); h = 1 and h = 0 are covered too.
module tb_gf_divider_binary;
  import tb_ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic start, done;
  logic [162:0] g, h, z;
  gf_divider_binary dut (.clk, .reset, .start, .g, .h, .z, .done);

  int cyc = 0, maxlat = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fe_t vg, fe_t vh);
    int t0, lat;
    fe_t e;
    g = 163'(vg); h = 163'(vh);
    @(negedge clk) start = 1;
    @(posedge clk) t0 = cyc;
    @(negedge clk) start = 0;
    do @(posedge clk); while (!done);
    lat = cyc - t0;
    if (lat > maxlat) maxlat = lat;
    e = (vh == '0) ? '0 : fmul(vg, finv(vh, 163), 163);
    checks++;
    if (fe_t'(z) != e) begin failures++; $display("FAIL g=%h h=%h got %h exp %h", vg, vh, z, e); end
    checks++;
    if (lat != 2 * 163) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    start = 0; g = '0; h = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    run(rand_fe(163), fe_t'(1));
    run(rand_fe(163), '0);
    run(fe_t'(1), mask(163));
    run(fe_t'(1), fe_t'(1) << 162);
    for (int i = 0; i < 60; i++) run(rand_fe(163), rand_fe(163));
    $display("longest division: %0d cycles", maxlat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
