// tb_aes_cipher: encrypts the FIPS-197 vectors and random blocks, singly and
// back to back, against the reference AES.  Checks the latency (done eleven
// cycles after start) and the throughput (one block every ten cycles when
// starts are issued in the last round).
module tb_aes_cipher;
  import ccmp_ref_pkg::*;
  logic clk = 0, rst, start, done, busy;
  logic [127:0] plain, key, cipherdata;
  int checks = 0, failures = 0;

  aes_cipher dut (.clk, .rst, .start, .plain, .key, .cipherdata, .done, .busy);

  always #5 clk = ~clk;

  // cycle counter and a log of every done pulse
  int cyc_now = 0, ndone = 0;
  int dcyc [16];
  logic [127:0] dct [16];
  always @(posedge clk) begin
    cyc_now <= cyc_now + 1;
    if (done && ndone < 16) begin
      dcyc[ndone] <= cyc_now;
      dct[ndone]  <= cipherdata;
      ndone       <= ndone + 1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(logic [127:0] k, logic [127:0] p, logic [127:0] expct);
    int cyc = 0;
    @(negedge clk);
    start = 1; key = k; plain = p;
    @(negedge clk);
    start = 0;
    while (!done && cyc < 50) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != 10) begin failures++; $display("latency %0d", cyc + 1); end
    if (cipherdata !== expct) begin failures++; $display("ct %h exp %h", cipherdata, expct); end
  endtask

  initial begin
    logic [127:0] ks, ps [8];
    int t0;
    rst = 1; start = 0; plain = '0; key = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    one(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    one(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    for (int i = 0; i < 30; i++) begin
      logic [127:0] k, p;
      k = rand128(); p = rand128();
      one(k, p, aes_enc(k, p));
    end
    // back to back: start again in the last round of the previous block
    ks = rand128();
    foreach (ps[i]) ps[i] = rand128();
    @(negedge clk);
    @(negedge clk);
    ndone = 0;
    key = ks;
    t0 = cyc_now;
    for (int b = 0; b < 8; b++) begin
      start = 1;
      @(negedge clk);
      start = 0; plain = ps[b];
      repeat (9) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (ndone != 8) begin failures++; $display("b2b done count %0d", ndone); end
    for (int b = 0; b < 8 && b < ndone; b++) begin
      checks += 2;
      if (dct[b] !== aes_enc(ks, ps[b])) begin failures++; $display("b2b block %0d", b); end
      if (dcyc[b] - t0 != 11 + 10*b) begin failures++; $display("b2b block %0d at %0d", b, dcyc[b] - t0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
