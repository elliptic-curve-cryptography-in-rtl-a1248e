// tb_main_controller - end-to-end test of the secure Ethernet link at its
// default parameters (sect163k1, 8 multiplier bits per clock, 1400 data bytes).
//
// The link is tested in loop-back: the own public key (from the key
// generator) is used as the peer key, and the frames leaving port B are fed
// back into port B, so the decrypting side recovers what the encrypting side
// sent. Flow:
//   key generation, compared with the reference model;
//   configuration frames on A (destination port 80) and on B (source
//   port 5000); frames of other connections, of other EtherTypes and with no
//   TCP data, which must pass unchanged in both directions;
//   messages of 100, 1400 and 1430 data bytes (the last is cut to 1400): each
//   must leave B as a C1 frame (header + 41 bytes) and a C2 frame (header +
//   41 bytes per 40-byte block), C1 must lie on the curve, the first block is
//   also decrypted by the reference model, and after loop-back the recovered
//   frame on A must equal the original (header + first 1400 data bytes).
// The transmit ready signals are driven from $urandom to exercise back
// pressure. Every mechanism below is counted and one that never happened
// counts as a failure.
module tb_main_controller;
  import tb_ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic [162:0] priv_d, peer_xQ, peer_yQ, own_xQ, own_yQ;
  logic         kg_start, kg_done;
  logic [7:0]   a_rx_data, a_tx_data, b_rx_data, b_tx_data;
  logic a_rx_valid, a_rx_last, a_rx_ready, a_tx_valid, a_tx_last, a_tx_ready;
  logic b_rx_valid, b_rx_last, b_rx_ready, b_tx_valid, b_tx_last, b_tx_ready;
  logic enc_configured, dec_configured;
  logic [1:0] enc_class, dec_class;

  main_controller dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- frame capture on both transmit ports ----------------
  localparam int FMAX = 1600;
  logic [7:0] fa [0:3][0:FMAX-1];  int la [0:3];  int na = 0, pa = 0;
  logic [7:0] fb [0:3][0:FMAX-1];  int lb [0:3];  int nb = 0, pb = 0;
  int n_stall = 0;

  always @(posedge clk) if (!reset) begin
    if (a_tx_valid && a_tx_ready) begin
      if (pa < FMAX) fa[na % 4][pa] <= a_tx_data;
      pa = pa + 1;
      if (a_tx_last) begin la[na % 4] = pa; na++; pa = 0; end
    end
    if (b_tx_valid && b_tx_ready) begin
      if (pb < FMAX) fb[nb % 4][pb] <= b_tx_data;
      pb = pb + 1;
      if (b_tx_last) begin lb[nb % 4] = pb; nb++; pb = 0; end
    end
    if ((a_tx_valid && !a_tx_ready) || (b_tx_valid && !b_tx_ready)) n_stall++;
  end
  always @(negedge clk) begin
    a_tx_ready = ($urandom_range(0, 3) != 0);
    b_tx_ready = ($urandom_range(0, 3) != 0);
  end

  // ---------------- mechanism counters ----------------
  int n_keygen = 0, n_cfg_a = 0, n_cfg_b = 0, n_fwd_ab = 0, n_fwd_ba = 0;
  int n_enc_frame = 0, n_dec_frame = 0, n_enc_full = 0, n_enc_reuse = 0;
  int n_dec_full = 0, n_dec_reuse = 0, n_add_identity = 0, n_add_general = 0;
  int n_partial_blk = 0, n_cut = 0;
  always @(posedge clk) if (!reset) begin
    if (kg_start) n_keygen++;
    if (dut.u_core.enc_start) begin if (dut.u_core.enc_reuse_k) n_enc_reuse++; else n_enc_full++; end
    if (dut.u_core.dec_start) begin if (dut.u_core.dec_reuse_k) n_dec_reuse++; else n_dec_full++; end
    if (dut.u_core.u_enc.u_add.start) begin
      if (dut.u_core.u_enc.u_add.p1_inf || dut.u_core.u_enc.u_add.p2_inf) n_add_identity++;
      else if (!dut.u_core.u_enc.u_add.trivial) n_add_general++;
    end
    if (dut.u_core.u_keygen.u_pm.u_add.start && dut.u_core.u_keygen.u_pm.u_add.p1_inf)
      n_add_identity++;
    if (dut.u_enc_if.state == dut.u_enc_if.ENC && dut.u_enc_if.bsize != 6'd40) n_partial_blk++;
  end

  // ---------------- frame building and sending ----------------
  logic [7:0] tx [0:FMAX-1];
  int txlen;
  localparam logic [47:0] HA = 48'h02_66_77_88_99_AA;  // protected host
  localparam logic [47:0] HB = 48'h02_11_22_33_44_55;  // remote host

  task automatic build(logic [47:0] dst, logic [47:0] src, logic [15:0] etype,
                       logic [15:0] sport, logic [15:0] dport, int ndata);
    for (int i = 0; i < 6; i++) begin tx[i] = dst[47-8*i -: 8]; tx[6+i] = src[47-8*i -: 8]; end
    tx[12] = etype[15:8]; tx[13] = etype[7:0];
    for (int i = 14; i < 54; i++) tx[i] = 8'($urandom());
    tx[14] = 8'h45; tx[23] = 8'd6;
    tx[34] = sport[15:8]; tx[35] = sport[7:0]; tx[36] = dport[15:8]; tx[37] = dport[7:0];
    for (int i = 0; i < ndata; i++) tx[54+i] = 8'($urandom());
    txlen = 54 + ndata;
  endtask

  task automatic build_cfg(logic [47:0] dst, logic [47:0] src, logic [15:0] port);
    logic [47:0] cd = 48'hDA_02_03_04_05_06, cs = 48'h5A_02_03_04_05_06;
    for (int i = 0; i < 6; i++) begin
      tx[i] = cd[47-8*i -: 8]; tx[6+i] = cs[47-8*i -: 8];
      tx[14+i] = dst[47-8*i -: 8]; tx[20+i] = src[47-8*i -: 8];
    end
    tx[12] = 8'h12; tx[13] = 8'h34; tx[26] = port[15:8]; tx[27] = port[7:0];
    for (int i = 28; i < 60; i++) tx[i] = 8'h00;
    txlen = 60;
  endtask

  task automatic send(bit port_b);
    for (int i = 0; i < txlen; i++) begin
      @(negedge clk);
      if (port_b) begin b_rx_data = tx[i]; b_rx_valid = 1; b_rx_last = (i == txlen - 1); end
      else        begin a_rx_data = tx[i]; a_rx_valid = 1; a_rx_last = (i == txlen - 1); end
      #1;   // ready is checked before the edge that takes the byte
      while (!(port_b ? b_rx_ready : a_rx_ready)) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    a_rx_valid = 0; a_rx_last = 0; b_rx_valid = 0; b_rx_last = 0;
  endtask

  task automatic wait_frames(bit port_b, int n);
    int t = 0;
    while ((port_b ? nb - pb_seen : na - pa_seen) < n && t < 400000) begin @(posedge clk); t++; end
    repeat (2) @(posedge clk);
  endtask
  int pa_seen = 0, pb_seen = 0;

  // frame fb/fa[idx] must equal tx[0 .. len-1]
  task automatic expect_same(bit port_b, string what);
    int idx = port_b ? pb_seen % 4 : pa_seen % 4;
    int l   = port_b ? lb[idx] : la[idx];
    bit ok  = (l == txlen);
    for (int i = 0; i < txlen && i < FMAX; i++)
      if ((port_b ? fb[idx][i] : fa[idx][i]) !== tx[i]) ok = 0;
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: frame differs (len %0d, expected %0d)", what, l, txlen); end
    if (port_b) pb_seen++; else pa_seen++;
  endtask

  // ---------------- one protected message ----------------
  logic [7:0] orig [0:FMAX-1];
  int origlen;
  pt_t g, qpub;
  fe_t vd;

  task automatic message(int ndata);
    int keep = (ndata > 1400) ? 1400 : ndata;
    int nblk = (keep + 39) / 40;
    int i1, i2, t0;
    pt_t c1, c2, s, m0;
    logic [325:0] blk0;
    build(HB, HA, 16'h0800, 16'd5000, 16'd80, ndata);
    for (int i = 0; i < txlen; i++) orig[i] = tx[i];
    origlen = 54 + keep;
    if (ndata > 1400) n_cut++;
    t0 = cyc;
    send(0);
    wait_frames(1, 2);
    $display("%0d-byte message: %0d cycles from first byte in to both frames out", ndata, cyc - t0);
    i1 = pb_seen % 4; i2 = (pb_seen + 1) % 4;
    checks++;
    if (nb - pb_seen != 2 || lb[i1] != 54 + 41 || lb[i2] != 54 + 41 * nblk) begin
      failures++;
      $display("FAIL %0d-byte message: got %0d frames, lengths %0d/%0d", ndata, nb - pb_seen, lb[i1], lb[i2]);
    end else n_enc_frame++;
    checks++;
    begin
      bit ok = 1;
      for (int i = 0; i < 54; i++) if (fb[i1][i] !== orig[i] || fb[i2][i] !== orig[i]) ok = 0;
      if (!ok) begin failures++; $display("FAIL %0d-byte message: header not copied", ndata); end
    end
    // C1 on the curve; block 0 decrypted by the reference model
    for (int i = 0; i < 41; i++) begin
      c1.x = '0; c1.y = '0;
    end
    begin
      logic [327:0] v1 = '0, v2 = '0;
      for (int i = 0; i < 41; i++) begin v1 = {v1[319:0], fb[i1][54+i]}; v2 = {v2[319:0], fb[i2][54+i]}; end
      c1.x = fe_t'(v1[325:163]); c1.y = fe_t'(v1[162:0]);
      c2.x = fe_t'(v2[325:163]); c2.y = fe_t'(v2[162:0]);
    end
    checks++;
    if (!on_curve(c1, 163)) begin failures++; $display("FAIL C1 off the curve"); end
    s = tmul(vd, c1, 163);
    m0 = padd(c2, pneg(s), 163);
    blk0 = '0;
    blk0[325:320] = 6'((keep < 40) ? keep : 40);
    for (int i = 0; i < 40; i++) blk0[319-8*i -: 8] = (i < keep) ? orig[54+i] : 8'h00;
    checks++;
    if (m0.x != fe_t'(blk0[325:163]) || m0.y != fe_t'(blk0[162:0])) begin
      failures++; $display("FAIL %0d-byte message: reference decryption of block 0 differs", ndata);
    end
    // loop-back through the decrypting side
    for (int k = 0; k < 2; k++) begin
      int ix = (pb_seen + k) % 4;
      for (int i = 0; i < lb[ix]; i++) tx[i] = fb[ix][i];
      txlen = lb[ix];
      send(1);
    end
    pb_seen += 2;
    wait_frames(0, 1);
    $display("%0d-byte message: %0d cycles for the round trip", ndata, cyc - t0);
    for (int i = 0; i < origlen; i++) tx[i] = orig[i];
    txlen = origlen;
    expect_same(0, $sformatf("%0d-byte message after decryption", ndata));
    n_dec_frame++;
  endtask

  initial begin
    priv_d = '0; peer_xQ = '0; peer_yQ = '0; kg_start = 0;
    a_rx_data = 0; a_rx_valid = 0; a_rx_last = 0; b_rx_data = 0; b_rx_valid = 0; b_rx_last = 0;
    g = gen163();
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;

    // key generation; the own key doubles as the peer key (loop-back)
    vd = rand_fe(163);
    priv_d = 163'(vd);
    @(negedge clk) kg_start = 1;
    @(negedge clk) kg_start = 0;
    while (!kg_done) @(posedge clk);
    qpub = tmul(vd, g, 163);
    checks++;
    if (fe_t'(own_xQ) != qpub.x || fe_t'(own_yQ) != qpub.y) begin failures++; $display("FAIL public key"); end
    peer_xQ = own_xQ; peer_yQ = own_yQ;

    // nothing is filtered before configuration
    build(HB, HA, 16'h0800, 16'd5000, 16'd80, 64);
    send(0); wait_frames(1, 1); expect_same(1, "unconfigured A->B"); n_fwd_ab++;

    build_cfg(HB, HA, 16'd80);   send(0); repeat (5) @(posedge clk);
    checks++; if (!enc_configured || enc_class != 2'd2) begin failures++; $display("FAIL A configuration"); end
    else n_cfg_a++;
    build_cfg(HB, HA, 16'd5000); send(1); repeat (5) @(posedge clk);
    checks++; if (!dec_configured || dec_class != 2'd2) begin failures++; $display("FAIL B configuration"); end
    else n_cfg_b++;
    checks++; if (nb != pb_seen || na != pa_seen) begin failures++; $display("FAIL configuration frame forwarded"); end

    // frames of other connections pass unchanged
    build(HB, HA, 16'h0800, 16'd5000, 16'd81, 100);   send(0); wait_frames(1, 1); expect_same(1, "other port A->B");  n_fwd_ab++;
    build(HB, HA, 16'h86DD, 16'd5000, 16'd80, 100);   send(0); wait_frames(1, 1); expect_same(1, "IPv6 A->B");        n_fwd_ab++;
    build(HB, HA, 16'h0800, 16'd5000, 16'd80, 0);     send(0); wait_frames(1, 1); expect_same(1, "empty TCP A->B");   n_fwd_ab++;
    build(HA, HB, 16'h0800, 16'd80,   16'd5000, 90);  send(1); wait_frames(0, 1); expect_same(0, "reverse B->A");     n_fwd_ba++;
    build(HB, HA, 16'h0800, 16'd5001, 16'd80, 90);    send(1); wait_frames(0, 1); expect_same(0, "other port B->A");  n_fwd_ba++;

    // protected messages
    message(100);
    message(1400);
    message(1430);

    checks++; if (n_keygen == 0)       begin failures++; $display("FAIL never: key generation"); end
    checks++; if (n_cfg_a == 0)        begin failures++; $display("FAIL never: configuration on A"); end
    checks++; if (n_cfg_b == 0)        begin failures++; $display("FAIL never: configuration on B"); end
    checks++; if (n_fwd_ab == 0)       begin failures++; $display("FAIL never: forwarding A->B"); end
    checks++; if (n_fwd_ba == 0)       begin failures++; $display("FAIL never: forwarding B->A"); end
    checks++; if (n_enc_frame == 0)    begin failures++; $display("FAIL never: encrypted frame pair"); end
    checks++; if (n_dec_frame == 0)    begin failures++; $display("FAIL never: decrypted frame"); end
    checks++; if (n_enc_full == 0)     begin failures++; $display("FAIL never: full encryption"); end
    checks++; if (n_enc_reuse == 0)    begin failures++; $display("FAIL never: reuse encryption"); end
    checks++; if (n_dec_full == 0)     begin failures++; $display("FAIL never: full decryption"); end
    checks++; if (n_dec_reuse == 0)    begin failures++; $display("FAIL never: reuse decryption"); end
    checks++; if (n_add_identity == 0) begin failures++; $display("FAIL never: addition with infinity"); end
    checks++; if (n_add_general == 0)  begin failures++; $display("FAIL never: general addition"); end
    checks++; if (n_partial_blk == 0)  begin failures++; $display("FAIL never: partial last block"); end
    checks++; if (n_cut == 0)          begin failures++; $display("FAIL never: data beyond 1400 bytes"); end
    checks++; if (n_stall == 0)        begin failures++; $display("FAIL never: transmit back pressure"); end
    $display("keygen %0d cfg %0d/%0d fwd %0d/%0d enc %0d dec %0d enc full/reuse %0d/%0d dec full/reuse %0d/%0d add id/gen %0d/%0d partial %0d cut %0d stall %0d",
             n_keygen, n_cfg_a, n_cfg_b, n_fwd_ab, n_fwd_ba, n_enc_frame, n_dec_frame, n_enc_full,
             n_enc_reuse, n_dec_full, n_dec_reuse, n_add_identity, n_add_general, n_partial_blk, n_cut, n_stall);
    $display("cycles: %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
