// ecc_workload_run - one configuration of the ECC core driven through a
// complete El Gamal exchange, used by tb_ecc_workloads.
//
// For the core built with the given M and D: generate a key pair, encrypt a
// random 2M-bit block (full) and a second one with reuse_k, decrypt both
// (full, then reuse_k), and check the public key against the reference model,
// C1 on the curve and both recovered blocks. The cycle counts of the first
// block's encryption and decryption are printed next to the averages the
// design reports for that configuration (REF_ENC, REF_DEC). checks and
// failures are outputs; finished rises when the run is over.
module ecc_workload_run #(
  parameter int M       = 163,
  parameter int D       = 8,
  parameter int REF_ENC = 0,
  parameter int REF_DEC = 0
) (
  input  logic clk,
  input  logic reset,
  output int   checks,
  output int   failures,
  output logic finished
);
  import tb_ecc_ref_pkg::*;

  logic kg_start, kg_done, enc_start, enc_reuse_k, enc_done, dec_start, dec_reuse_k, dec_done;
  logic [M-1:0] kg_d, kg_xQ, kg_yQ, enc_xQ, enc_yQ, enc_xC1, enc_yC1, enc_xC2, enc_yC2;
  logic [M-1:0] dec_d, dec_xC1, dec_yC1, dec_xC2, dec_yC2;
  logic [2*M-1:0] enc_data_in, dec_data_out;

  ecc_soft_ip #(.M(M), .D(D)) dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic run(int unit);
    @(negedge clk);
    case (unit) 0: kg_start = 1; 1: enc_start = 1; default: dec_start = 1; endcase
    @(negedge clk);
    kg_start = 0; enc_start = 0; dec_start = 0;
    case (unit)
      0: while (!kg_done) @(posedge clk);
      1: while (!enc_done) @(posedge clk);
      default: while (!dec_done) @(posedge clk);
    endcase
  endtask

  initial begin
    pt_t g, q, c1;
    fe_t vd;
    logic [2*M-1:0] p0, p1, c0, c2a, c2b;
    int t0, te, td;
    checks = 0; failures = 0; finished = 0;
    kg_start = 0; enc_start = 0; dec_start = 0; enc_reuse_k = 0; dec_reuse_k = 0;
    kg_d = '0; enc_xQ = '0; enc_yQ = '0; enc_data_in = '0;
    dec_d = '0; dec_xC1 = '0; dec_yC1 = '0; dec_xC2 = '0; dec_yC2 = '0;
    g = (M == 233) ? gen233() : gen163();
    @(negedge clk);
    while (reset) @(negedge clk);

    vd = rand_fe(M);
    kg_d = M'(vd);
    run(0);
    q = tmul(vd, g, M);
    checks++;
    if (fe_t'(kg_xQ) != q.x || fe_t'(kg_yQ) != q.y) begin
      failures++; $display("FAIL M=%0d D=%0d: public key", M, D);
    end
    enc_xQ = kg_xQ; enc_yQ = kg_yQ; dec_d = kg_d;

    p0 = {M'(rand_fe(M)), M'(rand_fe(M))};
    p1 = {M'(rand_fe(M)), M'(rand_fe(M))};
    enc_data_in = p0; enc_reuse_k = 0;
    t0 = cyc; run(1); te = cyc - t0;
    c0 = {enc_xC1, enc_yC1}; c2a = {enc_xC2, enc_yC2};
    enc_data_in = p1; enc_reuse_k = 1;
    run(1);
    c2b = {enc_xC2, enc_yC2};
    c1.x = fe_t'(c0[2*M-1:M]); c1.y = fe_t'(c0[M-1:0]);
    checks++;
    if (!on_curve(c1, M)) begin failures++; $display("FAIL M=%0d D=%0d: C1 off the curve", M, D); end

    {dec_xC1, dec_yC1} = c0; {dec_xC2, dec_yC2} = c2a; dec_reuse_k = 0;
    t0 = cyc; run(2); td = cyc - t0;
    checks++;
    if (dec_data_out != p0) begin failures++; $display("FAIL M=%0d D=%0d: block 1", M, D); end
    {dec_xC2, dec_yC2} = c2b; dec_reuse_k = 1;
    run(2);
    checks++;
    if (dec_data_out != p1) begin failures++; $display("FAIL M=%0d D=%0d: block 2", M, D); end

    $display("M=%0d D=%0d (%s divider): first block encrypted in %0d cycles (reported average %0d), decrypted in %0d (reported %0d)",
             M, D, dut.u_enc.u_add.u_div.ITOH ? "Itoh-Tsujii" : "binary", te, REF_ENC, td, REF_DEC);
    finished = 1;
  end
endmodule
