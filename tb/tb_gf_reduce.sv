// tb_gf_reduce - self-checking test of the polynomial reducer for
// M = 163 with a 325-bit input (the squarer's width) and a 170-bit input
// (the multiplier's accumulator at D = 8). The reference sums x^i mod F(x)
// over the set input bits.
module tb_gf_reduce;
  import tb_ecc_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [324:0] c1;
  logic [162:0] z1, z2;
  logic [169:0] c2;
  gf_reduce                         dut1 (.c(c1), .z(z1));
  gf_reduce #(.M(163), .IN_W(170))  dut2 (.c(c2), .z(z2));

  task automatic run(fe2_t v);
    fe_t e1, e2;
    c1 = v[324:0];
    c2 = v[169:0];
    #1;
    e1 = freduce(v, 325, 163);
    e2 = freduce(fe2_t'(v[169:0]), 170, 163);
    checks += 2;
    if (fe_t'(z1) != e1) begin failures++; $display("FAIL 325-bit c=%h", c1); end
    if (fe_t'(z2) != e2) begin failures++; $display("FAIL 170-bit c=%h", c2); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe2_t v;
    run('0);
    run(fe2_t'(1) << 324);
    run({{817{1'b0}}, {325{1'b1}}});
    run(fe2_t'(1) << 163);
    for (int i = 0; i < 200; i++) begin
      v = {rand_fe(571), rand_fe(571)};
      run(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
