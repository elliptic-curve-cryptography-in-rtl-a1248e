// tb_ecc_workloads - runs the ECC core at two further configurations that the
// design evaluates, next to the default one:
//   M = 163, D = 82: 2-cycle multiplier; 162 squarings + 9 x 2 cycles <= 326,
//                    so the Itoh-Tsujii divider must be built
//   M = 233, D = 30: 8-cycle multiplier on sect233k1 (curve coefficient a = 0);
//                    232 + 10 x 8 <= 466, Itoh-Tsujii again
// Each instance of ecc_workload_run does key generation, a full and a reuse
// encryption and the matching decryptions, checked against the reference
// model. The cycle counts are printed beside the reported averages.
module tb_ecc_workloads;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  int c0, f0, c1, f1;
  logic done0, done1;

  ecc_workload_run #(.M(163), .D(82), .REF_ENC(24914), .REF_DEC(27218)) u_163_82 (
    .clk, .reset, .checks(c0), .failures(f0), .finished(done0));
  ecc_workload_run #(.M(233), .D(30), .REF_ENC(60063), .REF_DEC(55499)) u_233_30 (
    .clk, .reset, .checks(c1), .failures(f1), .finished(done1));

  initial begin
    int checks, failures;
    fork
      begin
        repeat (3) @(posedge clk);
        @(negedge clk) reset = 0;
        wait (done0 && done1);
        checks = c0 + c1 + 2; failures = f0 + f1;
        // both configurations must select the Itoh-Tsujii divider
        if (!u_163_82.dut.u_enc.u_add.u_div.ITOH) begin failures++; $display("FAIL M=163 D=82 did not build Itoh-Tsujii"); end
        if (!u_233_30.dut.u_enc.u_add.u_div.ITOH) begin failures++; $display("FAIL M=233 D=30 did not build Itoh-Tsujii"); end
      end
      begin
        repeat (2000000) @(posedge clk);
        checks = c0 + c1; failures = f0 + f1 + 1;
        $display("watchdog expired");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
