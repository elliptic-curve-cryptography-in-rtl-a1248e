// tb_gf_multiplier - self-checking test of the digit-serial multiplier.
// Three instances over GF(2^163): D = 8 (default, 21 cycles), D = 82 (2
// cycles) and D = 1 (163 cycles), plus D = 30 over GF(2^233) (8 cycles).
// Checks every product against the reference and that done comes exactly
// ceil(M/D) cycles after start.
module tb_gf_multiplier;
  import tb_ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic s8, s82, s1, s233;
  logic d8, d82, d1, d233;
  logic [162:0] a, b, z8, z82, z1;
  logic [232:0] a2, b2, z233;

  gf_multiplier                    dut8   (.clk, .reset, .start(s8),   .a, .b, .z(z8),  .done(d8));
  gf_multiplier #(.M(163), .D(82)) dut82  (.clk, .reset, .start(s82),  .a, .b, .z(z82), .done(d82));
  gf_multiplier #(.M(163), .D(1))  dut1   (.clk, .reset, .start(s1),   .a, .b, .z(z1),  .done(d1));
  gf_multiplier #(.M(233), .D(30)) dut233 (.clk, .reset, .start(s233), .a(a2), .b(b2), .z(z233), .done(d233));

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // start one instance, wait for done, check value and latency
  task automatic run(int which, fe_t va, fe_t vb);
    int t0, lat, expn, m;
    fe_t got, e;
    m = (which == 3) ? 233 : 163;
    if (which == 3) begin a2 = 233'(va); b2 = 233'(vb); end
    else begin a = 163'(va); b = 163'(vb); end
    @(negedge clk);
    case (which) 0: s8 = 1; 1: s82 = 1; 2: s1 = 1; default: s233 = 1; endcase
    @(posedge clk); t0 = cyc;
    @(negedge clk); s8 = 0; s82 = 0; s1 = 0; s233 = 0;
    forever begin
      @(posedge clk);
      if ((which == 0 && d8) || (which == 1 && d82) || (which == 2 && d1) || (which == 3 && d233)) break;
    end
    lat = cyc - t0;
    case (which) 0: expn = 21; 1: expn = 2; 2: expn = 163; default: expn = 8; endcase
    case (which) 0: got = fe_t'(z8); 1: got = fe_t'(z82); 2: got = fe_t'(z1); default: got = fe_t'(z233); endcase
    e = fmul(va, vb, m);
    checks++;
    if (got != e) begin failures++; $display("FAIL value inst %0d", which); end
    checks++;
    if (lat != expn) begin failures++; $display("FAIL latency inst %0d: %0d cycles, expected %0d", which, lat, expn); end
  endtask

  initial begin
    s8 = 0; s82 = 0; s1 = 0; s233 = 0;
    a = '0; b = '0; a2 = '0; b2 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int w = 0; w < 4; w++) begin
      int m;
      m = (w == 3) ? 233 : 163;
      run(w, mask(m), mask(m));
      run(w, fe_t'(1), rand_fe(m));
      run(w, rand_fe(m), '0);
      for (int i = 0; i < 25; i++) run(w, rand_fe(m), rand_fe(m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
