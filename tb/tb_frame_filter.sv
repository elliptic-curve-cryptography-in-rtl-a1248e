// tb_frame_filter - self-checking test of the Ethernet frame filter
// (destination-port rule, default frame size).
//
// Frames are driven byte by byte on rx; everything leaving tx and cr is
// captured frame by frame and compared with the frame that was sent. Cases:
// an unconfigured filter forwards everything; a configuration frame is
// consumed and sets the connection; a matching IPv4/TCP frame goes to cr
// unchanged; frames differing in destination MAC, source MAC, EtherType,
// protocol or port, and a frame without TCP data, go to tx unchanged; a frame
// on the return path cb reaches tx whole, also while a forwarded frame is
// waiting; a second configuration frame replaces the first; a frame longer
// than MAX_FRAME is cut to MAX_FRAME bytes. The tx and cr ready signals are
// random. last_class is checked after every frame.
module tb_frame_filter;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic [7:0] rx_data, tx_data, cr_data, cb_data;
  logic rx_valid, rx_last, rx_ready, tx_valid, tx_last, tx_ready;
  logic cr_valid, cr_last, cr_ready, cb_valid, cb_last, cb_ready;
  logic configured;
  logic [1:0] last_class;

  frame_filter dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // capture
  localparam int FMAX = 1700;
  logic [7:0] ftx [0:3][0:FMAX-1]; int ltx [0:3]; int ntx = 0, ptx = 0;
  logic [7:0] fcr [0:FMAX-1];      int lcr = 0;   int ncr = 0, pcr = 0;
  always @(posedge clk) if (!reset) begin
    if (tx_valid && tx_ready) begin
      if (ptx < FMAX) ftx[ntx % 4][ptx] <= tx_data;
      ptx = ptx + 1;
      if (tx_last) begin ltx[ntx % 4] = ptx; ntx++; ptx = 0; end
    end
    if (cr_valid && cr_ready) begin
      if (pcr < FMAX) fcr[pcr] <= cr_data;
      pcr = pcr + 1;
      if (cr_last) begin lcr = pcr; ncr++; pcr = 0; end
    end
  end
  always @(negedge clk) begin
    tx_ready = ($urandom_range(0, 2) != 0);
    cr_ready = ($urandom_range(0, 2) != 0);
  end

  logic [7:0] fr [0:FMAX-1]; int flen;
  logic [7:0] cbf [0:FMAX-1]; int cblen;
  localparam logic [47:0] HA = 48'h02_66_77_88_99_AA, HB = 48'h02_11_22_33_44_55;

  task automatic build(logic [47:0] dst, logic [47:0] src, logic [15:0] etype, logic [7:0] proto,
                       logic [15:0] sport, logic [15:0] dport, int ndata);
    for (int i = 0; i < 6; i++) begin fr[i] = dst[47-8*i -: 8]; fr[6+i] = src[47-8*i -: 8]; end
    fr[12] = etype[15:8]; fr[13] = etype[7:0];
    for (int i = 14; i < 54 + ndata; i++) fr[i] = 8'($urandom());
    fr[23] = proto;
    fr[34] = sport[15:8]; fr[35] = sport[7:0]; fr[36] = dport[15:8]; fr[37] = dport[7:0];
    flen = 54 + ndata;
  endtask

  task automatic build_cfg(logic [47:0] dst, logic [47:0] src, logic [15:0] port);
    build(48'hDA_02_03_04_05_06, 48'h5A_02_03_04_05_06, 16'h1234, 8'h00, 16'h0, 16'h0, 6);
    for (int i = 0; i < 6; i++) begin fr[14+i] = dst[47-8*i -: 8]; fr[20+i] = src[47-8*i -: 8]; end
    fr[26] = port[15:8]; fr[27] = port[7:0];
  endtask

  task automatic send();
    for (int i = 0; i < flen; i++) begin
      @(negedge clk);
      rx_data = fr[i]; rx_valid = 1; rx_last = (i == flen - 1);
      #1;
      while (!rx_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    rx_valid = 0; rx_last = 0;
  endtask

  task automatic send_cb();
    for (int i = 0; i < cblen; i++) begin
      @(negedge clk);
      cb_data = cbf[i]; cb_valid = 1; cb_last = (i == cblen - 1);
      #1;
      while (!cb_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    cb_valid = 0; cb_last = 0;
  endtask

  task automatic settle();
    int t = 0;
    while ((ptx != 0 || pcr != 0 || dut.state != dut.RECV || tx_valid || cr_valid) && t < 10000) begin
      @(posedge clk); t++;
    end
    repeat (4) @(posedge clk);
  endtask

  int seen_tx = 0, seen_cr = 0;

  // check that exactly one new frame left on tx (or cr) and equals fr[0..n-1]
  task automatic expect_out(bit on_cr, int n, logic [1:0] cls, string what);
    bit ok;
    settle();
    ok = on_cr ? (ncr == seen_cr + 1 && ntx == seen_tx && lcr == n)
               : (ntx == seen_tx + 1 && ncr == seen_cr && ltx[seen_tx % 4] == n);
    if (ok) for (int i = 0; i < n; i++)
      if ((on_cr ? fcr[i] : ftx[seen_tx % 4][i]) !== fr[i]) ok = 0;
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: wrong output frame", what); end
    checks++;
    if (last_class != cls) begin failures++; $display("FAIL %s: class %0d, expected %0d", what, last_class, cls); end
    seen_tx = ntx; seen_cr = ncr;
  endtask

  task automatic expect_consumed(string what);
    settle();
    checks++;
    if (ntx != seen_tx || ncr != seen_cr || last_class != 2'd2) begin
      failures++; $display("FAIL %s: configuration frame not consumed", what);
    end
  endtask

  initial begin
    rx_data = 0; rx_valid = 0; rx_last = 0; cb_data = 0; cb_valid = 0; cb_last = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;

    build(HB, HA, 16'h0800, 8'd6, 16'd5000, 16'd80, 50);  send(); expect_out(0, flen, 0, "unconfigured");
    checks++; if (configured) begin failures++; $display("FAIL configured after reset"); end

    build_cfg(HB, HA, 16'd80); send(); expect_consumed("first configuration");
    checks++; if (!configured) begin failures++; $display("FAIL not configured"); end

    build(HB, HA, 16'h0800, 8'd6, 16'd5000, 16'd80, 300); send(); expect_out(1, flen, 1, "matching frame");
    build(HB, HA, 16'h0800, 8'd6, 16'd5000, 16'd80, 1);   send(); expect_out(1, flen, 1, "one data byte");
    build(HB, HA, 16'h0800, 8'd6, 16'd5000, 16'd80, 0);   send(); expect_out(0, flen, 0, "no data");
    build(HA, HA, 16'h0800, 8'd6, 16'd5000, 16'd80, 64);  send(); expect_out(0, flen, 0, "other destination MAC");
    build(HB, HB, 16'h0800, 8'd6, 16'd5000, 16'd80, 64);  send(); expect_out(0, flen, 0, "other source MAC");
    build(HB, HA, 16'h86DD, 8'd6, 16'd5000, 16'd80, 64);  send(); expect_out(0, flen, 0, "other EtherType");
    build(HB, HA, 16'h0800, 8'd17, 16'd5000, 16'd80, 64); send(); expect_out(0, flen, 0, "UDP");
    build(HB, HA, 16'h0800, 8'd6, 16'd80, 16'd5000, 64);  send(); expect_out(0, flen, 0, "port only as source");

    // return path alone
    cblen = 200;
    for (int i = 0; i < cblen; i++) cbf[i] = 8'($urandom());
    send_cb();
    settle();
    checks++;
    begin
      bit ok;
      ok = (ntx == seen_tx + 1) && (ltx[seen_tx % 4] == cblen);
      for (int i = 0; i < cblen; i++) if (ftx[seen_tx % 4][i] !== cbf[i]) ok = 0;
      if (!ok) begin failures++; $display("FAIL return path frame (%0d frames, len %0d)", ntx - seen_tx, ltx[seen_tx % 4]); end
    end
    seen_tx = ntx;

    // return path and a forwarded frame at the same time: both whole
    build(HB, HA, 16'h0800, 8'd6, 16'd5000, 16'd81, 120);
    cblen = 150;
    for (int i = 0; i < cblen; i++) cbf[i] = 8'($urandom());
    fork send(); send_cb(); join
    settle();
    checks++;
    begin
      bit ok;
      int a, b, f, c;
      ok = (ntx == seen_tx + 2);
      a = seen_tx % 4; b = (seen_tx + 1) % 4;
      f = (ltx[a] == flen) ? a : b;  c = (f == a) ? b : a;
      if (ltx[f] != flen || ltx[c] != cblen) ok = 0;
      for (int i = 0; i < flen && ok; i++) if (ftx[f][i] !== fr[i]) ok = 0;
      for (int i = 0; i < cblen && ok; i++) if (ftx[c][i] !== cbf[i]) ok = 0;
      if (!ok) begin failures++; $display("FAIL forwarded and returned frames mixed"); end
    end
    seen_tx = ntx;

    // a new configuration replaces the old one
    build_cfg(HA, HB, 16'd443); send(); expect_consumed("second configuration");
    build(HB, HA, 16'h0800, 8'd6, 16'd5000, 16'd80, 64);  send(); expect_out(0, flen, 0, "old connection");
    build(HA, HB, 16'h0800, 8'd6, 16'd5000, 16'd443, 64); send(); expect_out(1, flen, 1, "new connection");

    // random frames: match decided by the reference rule
    for (int n = 0; n < 20; n++) begin
      bit m;
      m = 1'($urandom_range(0, 1));
      build(m ? HA : HB, HB, 16'h0800, 8'd6, 16'd7, m ? 16'd443 : 16'($urandom_range(0, 442)),
            $urandom_range(1, 400));
      send(); expect_out(m, flen, m ? 2'd1 : 2'd0, "random frame");
    end

    // oversize frame is cut to MAX_FRAME bytes
    build(HB, HA, 16'h0800, 8'd6, 16'd5000, 16'd80, 1600 - 54); send(); expect_out(0, 1514, 0, "oversize frame");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
