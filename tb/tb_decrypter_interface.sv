// tb_decrypter_interface - self-checking test of the frame-pair decrypter
// interface (M = 163: 41-byte ciphertexts, 40-byte blocks).
//
// The ECC decrypter is replaced by a model in the testbench that returns
// {C2} XOR a mask derived from C1 after a random delay, so the testbench can
// build C1/C2 frame pairs from known data. For data lengths 0 (one block with
// size 0), 1, 39, 40, 41, 100, random lengths and 1400 it checks the recovered
// frame (header of the C2 frame + data), that the model saw the C1 of the
// pair, and that only the first block is a full decryption. It also checks
// that a size field larger than 40 is limited to 40 bytes and that a C2 frame
// with a trailing partial ciphertext ignores it. out_ready is random.
module tb_decrypter_interface;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic [7:0]   in_data, out_data;
  logic         in_valid, in_last, in_ready, out_valid, out_last, out_ready;
  logic         dec_start, dec_reuse_k, dec_done;
  logic [162:0] dec_xC1, dec_yC1, dec_xC2, dec_yC2;
  logic [325:0] dec_data_out;

  decrypter_interface dut (.*);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [325:0] mask_of(logic [325:0] c1);
    return {c1[100:0], c1[325:101]} ^ 326'h3A5;
  endfunction

  int n_full = 0, n_reuse = 0, n_wrong_c1 = 0;
  logic [325:0] c1_cur;
  initial begin
    dec_done = 0; dec_data_out = '0;
    forever begin
      @(posedge clk);
      if (dec_start && !reset) begin
        logic [325:0] c1, c2;
        c1 = {dec_xC1, dec_yC1}; c2 = {dec_xC2, dec_yC2};
        if (dec_reuse_k) n_reuse++; else n_full++;
        if (c1 != c1_cur) n_wrong_c1++;
        repeat ($urandom_range(2, 30)) @(posedge clk);
        @(negedge clk);
        dec_data_out = c2 ^ mask_of(c1);
        dec_done = 1;
        @(negedge clk) dec_done = 0;
      end
    end
  end

  localparam int FMAX = 1600;
  logic [7:0] fo [0:FMAX-1]; int lo = 0; int no = 0, po = 0;
  always @(posedge clk) if (!reset && out_valid && out_ready) begin
    if (po < FMAX) fo[po] <= out_data;
    po = po + 1;
    if (out_last) begin lo = po; no++; po = 0; end
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  logic [7:0] fr [0:FMAX-1]; int flen;
  logic [7:0] hdr [0:53];
  logic [7:0] data [0:1499];

  task automatic send();
    for (int i = 0; i < flen; i++) begin
      @(negedge clk);
      in_data = fr[i]; in_valid = 1; in_last = (i == flen - 1);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk); in_valid = 0; in_last = 0;
  endtask

  // size_over: write size 63 into the last block (must be read as 40)
  // tail: extra bytes after the last ciphertext
  task automatic one(int ndata, bit size_over, int tail);
    int nblk = (ndata == 0) ? 1 : (ndata + 39) / 40;
    int full0 = n_full, reuse0 = n_reuse, t = 0, expl;
    bit ok;
    logic [325:0] c1, blk;
    for (int i = 0; i < 54; i++) hdr[i] = 8'($urandom());
    for (int i = 0; i < ndata; i++) data[i] = 8'($urandom());
    for (int i = 0; i < 11; i++) c1[i*32 +: 32] = $urandom();
    c1_cur = c1;
    // frame 1: random header + C1
    for (int i = 0; i < 54; i++) fr[i] = 8'($urandom());
    for (int i = 0; i < 41; i++) fr[54+i] = 8'({2'b00, c1} >> (8 * (40 - i)));
    flen = 95;
    send();
    // frame 2: header + C2 per block
    for (int i = 0; i < 54; i++) fr[i] = hdr[i];
    for (int b = 0; b < nblk; b++) begin
      int sz = (ndata - 40 * b > 40) ? 40 : ndata - 40 * b;
      blk = '0;
      blk[325:320] = (size_over && b == nblk - 1) ? 6'd63 : 6'(sz);
      for (int i = 0; i < 40; i++) blk[319 - 8 * i -: 8] = (i < sz) ? data[40 * b + i] : 8'($urandom());
      if (size_over && b == nblk - 1) for (int i = sz; i < 40; i++) data[40 * b + i] = blk[319 - 8 * i -: 8];
      blk = blk ^ mask_of(c1);
      for (int i = 0; i < 41; i++) fr[54 + 41 * b + i] = 8'({2'b00, blk} >> (8 * (40 - i)));
    end
    flen = 54 + 41 * nblk + tail;
    for (int i = 54 + 41 * nblk; i < flen; i++) fr[i] = 8'($urandom());
    no = 0;
    send();
    while (no < 1 && t < 100000) begin @(posedge clk); t++; end
    repeat (3) @(posedge clk);
    expl = size_over ? 40 * nblk : ndata;
    ok = (no == 1) && (lo == 54 + expl);
    for (int i = 0; i < 54 && ok; i++) if (fo[i] !== hdr[i]) ok = 0;
    for (int i = 0; i < expl && ok; i++) if (fo[54 + i] !== data[i]) ok = 0;
    checks++;
    if (!ok) begin failures++; $display("FAIL %0d bytes: recovered frame (len %0d)", ndata, lo); end
    checks++;
    if (n_full != full0 + 1 || n_reuse != reuse0 + nblk - 1) begin
      failures++; $display("FAIL %0d bytes: %0d full / %0d reuse", ndata, n_full - full0, n_reuse - reuse0);
    end
  endtask

  initial begin
    in_data = 0; in_valid = 0; in_last = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    one(0, 0, 0); one(1, 0, 0); one(39, 0, 0); one(40, 0, 0); one(41, 0, 0); one(100, 0, 0);
    for (int n = 0; n < 6; n++) one($urandom_range(1, 1400), 0, 0);
    one(1400, 0, 0);
    one(75, 1, 0);
    one(120, 0, 17);
    checks++;
    if (n_wrong_c1 != 0) begin failures++; $display("FAIL decrypter given a wrong C1 %0d times", n_wrong_c1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
