// tb_ecc_soft_ip - end-to-end test of the complete ECC core at its default
// parameters (sect163k1, 8 multiplier bits per clock).
//
// Flow: generate the public key Q = d*G; encrypt block 1 (full encryption),
// then blocks 2-4 of the same message with reuse_k; decrypt block 1 (full)
// and blocks 2-4 (reuse_k); encrypt and decrypt a second message, which must
// use a new scalar (C1 changes). Blocks 3 and 4 carry the data S and -S, where
// S = d*C1 is the shared secret, so the encrypter's point adder must double
// (rule 5) and meet P + (-P) (rule 3), and the decrypter meets the point at
// infinity (rule 2). Each mechanism is counted by watching the units' start
// signals and adder case decode; a mechanism that never happened counts as a
// failure. The public key is compared with the reference model and every
// decrypted block with its plaintext.
module tb_ecc_soft_ip;
  import tb_ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic kg_start, kg_done, enc_start, enc_reuse_k, enc_done, dec_start, dec_reuse_k, dec_done;
  logic [162:0] kg_d, kg_xQ, kg_yQ, enc_xQ, enc_yQ, enc_xC1, enc_yC1, enc_xC2, enc_yC2;
  logic [162:0] dec_d, dec_xC1, dec_yC1, dec_xC2, dec_yC2;
  logic [325:0] enc_data_in, dec_data_out;

  ecc_soft_ip dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc++;

  // mechanism counters
  int n_keygen = 0, n_enc_full = 0, n_enc_reuse = 0, n_dec_full = 0, n_dec_reuse = 0;
  int n_add_identity = 0, n_add_inverse = 0, n_add_general = 0, n_add_double = 0, n_new_k = 0;
  always @(posedge clk) if (!reset) begin
    if (kg_start) n_keygen++;
    if (enc_start) begin if (enc_reuse_k) n_enc_reuse++; else n_enc_full++; end
    if (dec_start) begin if (dec_reuse_k) n_dec_reuse++; else n_dec_full++; end
    if (dut.u_enc.u_add.start) begin
      if (dut.u_enc.u_add.p1_inf || dut.u_enc.u_add.p2_inf) n_add_identity++;
      else if (dut.u_enc.u_add.same_x && !dut.u_enc.u_add.same_y) n_add_inverse++;
      else if (dut.u_enc.u_add.is_dbl) n_add_double++;
      else n_add_general++;
    end
    if (dut.u_dec.u_add.start) begin
      if (dut.u_dec.u_add.p1_inf || dut.u_dec.u_add.p2_inf) n_add_identity++;
      else if (dut.u_dec.u_add.same_x && !dut.u_dec.u_add.same_y) n_add_inverse++;
      else if (dut.u_dec.u_add.is_dbl) n_add_double++;
      else n_add_general++;
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_wait(int unit);
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

  logic [325:0] ct [0:3][0:1];   // {C1, C2} per block, packed {x, y}
  logic [325:0] pt [0:3];

  task automatic encrypt(int blk, bit reuse);
    enc_data_in = pt[blk];
    enc_reuse_k = reuse;
    pulse_wait(1);
    ct[blk][0] = {enc_xC1, enc_yC1};
    ct[blk][1] = {enc_xC2, enc_yC2};
  endtask

  task automatic decrypt(int blk, bit reuse, string what);
    {dec_xC1, dec_yC1} = ct[blk][0];
    {dec_xC2, dec_yC2} = ct[blk][1];
    dec_reuse_k = reuse;
    pulse_wait(2);
    checks++;
    if (dec_data_out != pt[blk]) begin failures++; $display("FAIL %s: block %0d not recovered", what, blk); end
  endtask

  initial begin
    pt_t g, q, c1, s;
    fe_t vd;
    logic [325:0] first_c1;
    int t0;
    kg_start = 0; enc_start = 0; dec_start = 0; enc_reuse_k = 0; dec_reuse_k = 0;
    kg_d = '0; enc_xQ = '0; enc_yQ = '0; enc_data_in = '0;
    dec_d = '0; dec_xC1 = '0; dec_yC1 = '0; dec_xC2 = '0; dec_yC2 = '0;
    g = gen163();
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;

    // key generation
    vd = rand_fe(163);
    kg_d = 163'(vd);
    t0 = cyc;
    pulse_wait(0);
    $display("key generation: %0d cycles", cyc - t0);
    q = tmul(vd, g, 163);
    checks++;
    if (fe_t'(kg_xQ) != q.x || fe_t'(kg_yQ) != q.y) begin failures++; $display("FAIL public key"); end
    enc_xQ = kg_xQ; enc_yQ = kg_yQ;
    dec_d = kg_d;

    // message 1: block 0 full, blocks 1-3 reuse
    pt[0] = {163'(rand_fe(163)), 163'(rand_fe(163))};
    pt[1] = {163'(rand_fe(163)), 163'(rand_fe(163))};
    t0 = cyc;
    encrypt(0, 0);
    $display("full encryption: %0d cycles", cyc - t0);
    first_c1 = ct[0][0];
    c1.x = fe_t'(ct[0][0][325:163]); c1.y = fe_t'(ct[0][0][162:0]);
    checks++;
    if (!on_curve(c1, 163)) begin failures++; $display("FAIL C1 off curve"); end
    s = tmul(vd, c1, 163);                      // shared secret as the receiver sees it
    pt[2] = {163'(s.x), 163'(s.y)};             // data = S     -> C2 = 2S (doubling)
    pt[3] = {163'(s.x), 163'(s.x ^ s.y)};       // data = -S    -> C2 = O  (P + (-P))
    t0 = cyc;
    encrypt(1, 1);
    $display("reuse encryption: %0d cycles", cyc - t0);
    encrypt(2, 1);
    encrypt(3, 1);
    checks++;
    if (ct[1][0] != first_c1 || ct[3][0] != first_c1) begin failures++; $display("FAIL C1 changed under reuse_k"); end
    checks++;
    if (ct[3][1] != '0) begin failures++; $display("FAIL -S + S is not the point at infinity"); end

    t0 = cyc;
    decrypt(0, 0, "full decryption");
    $display("full decryption: %0d cycles", cyc - t0);
    decrypt(1, 1, "reuse decryption");
    decrypt(2, 1, "reuse decryption");
    decrypt(3, 1, "reuse decryption");

    // message 2: new scalar
    pt[0] = {163'(rand_fe(163)), 163'(rand_fe(163))};
    encrypt(0, 0);
    checks++;
    if (ct[0][0] != first_c1) n_new_k++;
    else begin failures++; $display("FAIL scalar not renewed"); end
    decrypt(0, 0, "full decryption, message 2");

    $display("mechanisms: keygen=%0d enc_full=%0d enc_reuse=%0d dec_full=%0d dec_reuse=%0d",
             n_keygen, n_enc_full, n_enc_reuse, n_dec_full, n_dec_reuse);
    $display("adder rules: identity=%0d inverse=%0d general=%0d doubling=%0d new_k=%0d",
             n_add_identity, n_add_inverse, n_add_general, n_add_double, n_new_k);
    checks++; if (n_keygen == 0)       begin failures++; $display("FAIL no key generation"); end
    checks++; if (n_enc_full == 0)     begin failures++; $display("FAIL no full encryption"); end
    checks++; if (n_enc_reuse == 0)    begin failures++; $display("FAIL no reuse encryption"); end
    checks++; if (n_dec_full == 0)     begin failures++; $display("FAIL no full decryption"); end
    checks++; if (n_dec_reuse == 0)    begin failures++; $display("FAIL no reuse decryption"); end
    checks++; if (n_add_identity == 0) begin failures++; $display("FAIL adder rules 1/2 never used"); end
    checks++; if (n_add_inverse == 0)  begin failures++; $display("FAIL adder rule 3 never used"); end
    checks++; if (n_add_general == 0)  begin failures++; $display("FAIL adder rule 4 never used"); end
    checks++; if (n_add_double == 0)   begin failures++; $display("FAIL adder rule 5 never used"); end
    checks++; if (n_new_k == 0)        begin failures++; $display("FAIL scalar never renewed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
