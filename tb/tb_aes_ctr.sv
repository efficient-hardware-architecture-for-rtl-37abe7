// tb_aes_ctr: encrypts counter blocks A_0..A_3 at the ten-cycle rate and
// checks the CTR half of CCM: S0 is kept by regs, T by regt, U = S0[127:64]
// xor T; the two-stage key-stream delay line, shifted by wr on every
// completion, presents S_i to the BX bus two completions after S_i was made,
// and CIPHER_MPDU = S_i xor BX.
module tb_aes_ctr;
  import ccmp_ref_pkg::*;
  logic clk = 0, rst, start, regt, regs, wr, done, busy;
  logic [127:0] cb, tk, bx, sx, cipher_mpdu;
  logic [63:0] t, u;
  int checks = 0, failures = 0;

  aes_ctr dut (.clk, .rst, .start, .cb, .tk, .bx, .t, .regt, .regs, .wr,
               .sx, .u, .cipher_mpdu, .done, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk_ct(logic [127:0] s, string what);
    bx = rand128();
    #1;
    checks++;
    if (cipher_mpdu !== (s ^ bx)) begin failures++; $display("%s: %h", what, cipher_mpdu); end
  endtask

  initial begin
    logic [103:0] nonce;
    logic [127:0] s [4];
    rst = 1; start = 0; regt = 0; regs = 0; wr = 0; cb = '0; tk = '0; bx = '0; t = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int trial = 0; trial < 5; trial++) begin
      tk = rand128();
      nonce = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 4; i++) s[i] = aes_enc(tk, {8'h01, nonce, 16'(i)});
      @(negedge clk);
      for (int b = 0; b < 4; b++) begin
        start = 1;
        @(negedge clk);
        start = 0;
        cb = {8'h01, nonce, 16'(b)};
        if (b > 0) begin
          // completion of block b-1
          checks++;
          if (!done || sx !== s[b-1]) begin failures++; $display("sx %0d", b - 1); end
          wr = 1; regs = (b == 1);
          @(negedge clk);
          wr = 0; regs = 0;
          if (b == 3) chk_ct(s[1], "C1");
          repeat (8) @(negedge clk);
        end else begin
          repeat (9) @(negedge clk);
        end
      end
      @(negedge clk);
      wr = 1;
      @(negedge clk);
      wr = 0;
      chk_ct(s[2], "C2");
      @(negedge clk);
      wr = 1;
      @(negedge clk);
      wr = 0;
      chk_ct(s[3], "C3");
      t = {$urandom, $urandom};
      regt = 1;
      @(negedge clk);
      regt = 0;
      checks++;
      if (u !== (s[0][127:64] ^ t)) begin failures++; $display("U %h", u); end
      t = ~t;
      @(negedge clk);
      checks++;
      if (u !== (s[0][127:64] ^ ~t)) begin failures++; $display("U not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
