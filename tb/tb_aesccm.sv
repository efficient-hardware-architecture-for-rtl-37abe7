// tb_aesccm: drives the CCM engine directly with already formatted blocks
// (B0, two AAD blocks, m payload blocks) and counter blocks A_0..A_m on the
// ten-cycle schedule used by the main controller, and checks each
// ciphertext block P_i xor S_i, T, and the encrypted MIC U = T xor S0
// against the reference AES.
module tb_aesccm;
  import ccmp_ref_pkg::*;
  logic clk = 0, rst, start_mac, start_ctr, sel, regt, regs, wr, mac_done, ctr_done;
  logic [127:0] tk, bx, cb, cipher_mpdu;
  logic [63:0] t, u;
  int checks = 0, failures = 0;

  aesccm dut (.clk, .rst, .start_mac, .start_ctr, .sel, .tk, .bx, .cb, .regt, .regs, .wr,
              .t, .u, .cipher_mpdu, .mac_done, .ctr_done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%t: %s", $time, what); end
  endtask

  int ndone;

  initial begin
    rst = 1; start_mac = 0; start_ctr = 0; sel = 0; regt = 0; regs = 0; wr = 0;
    tk = '0; bx = '0; cb = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int mm = 1; mm <= 4; mm++) begin
      int n;
      bit [103:0] nonce;
      bit [127:0] blk [8], s [8], x;
      n = mm + 3;
      tk = rand128();
      nonce = {$urandom, $urandom, $urandom, $urandom};
      foreach (blk[i]) blk[i] = rand128();
      for (int i = 0; i <= mm; i++) s[i] = aes_enc(tk, {8'h01, nonce, 16'(i)});
      x = aes_enc(tk, blk[0]);
      for (int i = 1; i < n; i++) x = aes_enc(tk, x ^ blk[i]);
      @(negedge clk);
      ndone = 0;
      // c = cycle offset from the first load
      for (int c = 0; c <= 10 * n + 2; c++) begin
        start_mac = (c % 10 == 0) && (c / 10 < n);
        start_ctr = (c % 10 == 0) && (c / 10 <= mm);
        if (c % 10 == 1 && c / 10 < n) begin
          bx  = blk[c / 10];
          sel = (c / 10 != 0);
        end
        if (c % 10 == 1 && c / 10 <= mm) cb = {8'h01, nonce, 16'(c / 10)};
        #1;
        wr   = mac_done;
        regs = mac_done && (ndone == 0);
        regt = mac_done && (ndone == n - 1);
        if (c % 10 == 2 && c / 10 >= 3 && c / 10 < n)
          chk(cipher_mpdu == (blk[c / 10] ^ s[c / 10 - 2]), $sformatf("m=%0d C%0d", mm, c / 10 - 2));
        if (regt) chk(t == x[127:64], "T");
        if (c == 10 * n + 2) chk(u == (x[127:64] ^ s[0][127:64]), $sformatf("U %h exp %h ndone %0d", u, x[127:64] ^ s[0][127:64], ndone));
        if (regs) chk(dut.sx == s[0], "S0");
        if (mac_done) ndone++;
        @(negedge clk);
      end
      start_mac = 0; start_ctr = 0; wr = 0; regs = 0; regt = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
