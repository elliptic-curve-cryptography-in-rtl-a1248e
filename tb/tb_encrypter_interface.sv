// tb_encrypter_interface - self-checking test of the frame-to-block
// encrypter interface (M = 163: 40-byte blocks, 41-byte ciphertexts).
//
// The ECC encrypter is replaced by a simple model in the testbench: it answers
// after a random delay with C1 = a value that changes on every full
// encryption and C2 = block XOR a mask tied to that C1. That makes every
// block of the two output frames predictable. For data lengths 0, 1, 39, 40,
// 41, 100, random lengths, 1400 and 1450 (cut to 1400) the test checks: the
// number and lengths of the output frames, the copied header, that C1 is the
// one of the first (full) encryption, that only the first block is a full
// encryption, and the size field, data bytes and zero padding of every block.
// out_ready is random.
module tb_encrypter_interface;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic [7:0]   in_data, out_data;
  logic         in_valid, in_last, in_ready, out_valid, out_last, out_ready;
  logic         enc_start, enc_reuse_k, enc_done;
  logic [325:0] enc_data_in;
  logic [162:0] enc_xC1, enc_yC1, enc_xC2, enc_yC2;

  encrypter_interface dut (.*);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // encrypter model
  logic [325:0] c1_model = '0, mask;
  int n_full = 0, n_reuse = 0;
  assign mask = {c1_model[162:0], c1_model[325:163]};
  initial begin
    enc_done = 0; {enc_xC1, enc_yC1, enc_xC2, enc_yC2} = '0;
    forever begin
      @(posedge clk);
      if (enc_start && !reset) begin
        logic [325:0] blk;
        bit reuse;
        blk = enc_data_in; reuse = enc_reuse_k;
        if (reuse) n_reuse++;
        else begin
          n_full++;
          for (int i = 0; i < 11; i++) c1_model[i*32 +: 32] = $urandom();
        end
        repeat ($urandom_range(2, 30)) @(posedge clk);
        @(negedge clk);
        {enc_xC1, enc_yC1} = c1_model;
        {enc_xC2, enc_yC2} = blk ^ mask;
        enc_done = 1;
        @(negedge clk) enc_done = 0;
      end
    end
  end

  // output capture
  localparam int FMAX = 1600;
  logic [7:0] fo [0:1][0:FMAX-1]; int lo [0:1]; int no = 0, po = 0;
  always @(posedge clk) if (!reset && out_valid && out_ready) begin
    if (po < FMAX) fo[no % 2][po] <= out_data;
    po = po + 1;
    if (out_last) begin lo[no % 2] = po; no++; po = 0; end
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  logic [7:0] fr [0:FMAX-1];
  int flen;

  task automatic one(int ndata);
    int keep = (ndata > 1400) ? 1400 : ndata;
    int nblk = (keep == 0) ? 1 : (keep + 39) / 40;
    int full0 = n_full, reuse0 = n_reuse, t = 0;
    bit ok;
    logic [327:0] v;
    for (int i = 0; i < 54 + ndata; i++) fr[i] = 8'($urandom());
    flen = 54 + ndata;
    no = 0;
    for (int i = 0; i < flen; i++) begin
      @(negedge clk);
      in_data = fr[i]; in_valid = 1; in_last = (i == flen - 1);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk); in_valid = 0; in_last = 0;
    while (no < 2 && t < 200000) begin @(posedge clk); t++; end
    repeat (5) @(posedge clk);
    checks++;
    if (no != 2 || lo[0] != 54 + 41 || lo[1] != 54 + 41 * nblk) begin
      failures++; $display("FAIL %0d bytes: frames %0d lengths %0d/%0d", ndata, no, lo[0], lo[1]);
      return;
    end
    ok = 1;
    for (int i = 0; i < 54; i++) if (fo[0][i] !== fr[i] || fo[1][i] !== fr[i]) ok = 0;
    checks++; if (!ok) begin failures++; $display("FAIL %0d bytes: header", ndata); end
    checks++;
    if (n_full != full0 + 1 || n_reuse != reuse0 + nblk - 1) begin
      failures++; $display("FAIL %0d bytes: %0d full / %0d reuse encryptions", ndata, n_full - full0, n_reuse - reuse0);
    end
    v = '0;
    for (int i = 0; i < 41; i++) v = {v[319:0], fo[0][54+i]};
    checks++; if (v != {2'b00, c1_model}) begin failures++; $display("FAIL %0d bytes: C1", ndata); end
    for (int b = 0; b < nblk; b++) begin
      logic [325:0] exp;
      int sz = (keep - 40 * b > 40) ? 40 : keep - 40 * b;
      v = '0;
      for (int i = 0; i < 41; i++) v = {v[319:0], fo[1][54 + 41 * b + i]};
      exp = '0;
      exp[325:320] = 6'(sz);
      for (int i = 0; i < sz; i++) exp[319 - 8 * i -: 8] = fr[54 + 40 * b + i];
      checks++;
      if (v != {2'b00, exp ^ mask}) begin failures++; $display("FAIL %0d bytes: block %0d", ndata, b); end
    end
  endtask

  initial begin
    in_data = 0; in_valid = 0; in_last = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    one(0); one(1); one(39); one(40); one(41); one(100);
    for (int n = 0; n < 6; n++) one($urandom_range(1, 1400));
    one(1400); one(1450);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
