// tb_gf_squarer - self-checking test of the combinational GF(2^M) squarer at
// M = 163 (default) and M = 571, against the reference multiplier a*a.
// Edge values (0, 1, all ones, top bit only) plus random operands.
module tb_gf_squarer;
  import tb_ecc_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [162:0] a1, c1;
  logic [570:0] a2, c2;
  gf_squarer                dut1 (.a(a1), .c(c1));
  gf_squarer #(.M(571))     dut2 (.a(a2), .c(c2));

  task automatic check163(logic [162:0] v);
    fe_t e;
    a1 = v; #1;
    e = fsq(fe_t'(v), 163);
    checks++;
    if (fe_t'(c1) != e) begin failures++; $display("FAIL m=163 a=%h got %h exp %h", v, c1, e); end
  endtask

  task automatic check571(logic [570:0] v);
    fe_t e;
    a2 = v; #1;
    e = fsq(v, 571);
    checks++;
    if (c2 != e) begin failures++; $display("FAIL m=571 a=%h", v); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check163('0); check163(163'd1); check163('1); check163(163'd1 << 162);
    check571('0); check571('1); check571(571'd1 << 570);
    for (int i = 0; i < 200; i++) check163(163'(rand_fe(163)));
    for (int i = 0; i < 40; i++) check571(rand_fe(571));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
