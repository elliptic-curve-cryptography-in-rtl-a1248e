// tb_gf_divider - self-checking test of the divider wrapper at M = 163 with
// D = 8 (the rule must pick the binary divider: 326 cycles) and D = 82
// (the rule must pick the Itoh-Tsujii divider: 163 squaring cycles + 10
// multiplications of 2 cycles, well under 2M). Values are compared with the
// reference model; the cycle counts show which architecture was built.
module tb_gf_divider;
  import tb_ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic s8, s82, d8, d82;
  logic [162:0] g, h, z8, z82;
  gf_divider                    dut8  (.clk, .reset, .start(s8),  .g, .h, .z(z8),  .done(d8));
  gf_divider #(.M(163), .D(82)) dut82 (.clk, .reset, .start(s82), .g, .h, .z(z82), .done(d82));

  int cyc = 0, max8 = 0, min8 = 1000000, max82 = 0, min82 = 1000000;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit big, fe_t vg, fe_t vh);
    int t0, lat;
    fe_t e;
    g = 163'(vg); h = 163'(vh);
    @(negedge clk) if (big) s82 = 1; else s8 = 1;
    @(posedge clk) t0 = cyc;
    @(negedge clk) begin s8 = 0; s82 = 0; end
    do @(posedge clk); while (!(big ? d82 : d8));
    lat = cyc - t0;
    e = fmul(vg, finv(vh, 163), 163);
    checks++;
    if (fe_t'(big ? z82 : z8) != e) begin failures++; $display("FAIL D=%0d", big ? 82 : 8); end
    if (big) begin if (lat > max82) max82 = lat; if (lat < min82) min82 = lat; end
    else begin if (lat > max8) max8 = lat; if (lat < min8) min8 = lat; end
  endtask

  initial begin
    s8 = 0; s82 = 0; g = '0; h = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int i = 0; i < 40; i++) begin
      fe_t a, b;
      a = rand_fe(163); b = rand_fe(163) | fe_t'(2);
      run(0, a, b);
      run(1, a, b);
    end
    $display("D=8: %0d..%0d cycles, D=82: %0d..%0d cycles", min8, max8, min82, max82);
    // binary: fixed 2M cycles
    checks++; if (max8 != 326 || min8 != 326) begin failures++; $display("FAIL D=8 timing"); end
    // Itoh-Tsujii: fixed latency, well below 2M
    checks++; if (max82 != min82 || max82 > 200) begin failures++; $display("FAIL D=82 timing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
