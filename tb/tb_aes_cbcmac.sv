// tb_aes_cbcmac: computes CBC-MACs over chains of 1..6 random blocks, issuing
// each block in the last round of the previous one (the ten-cycle rate), and
// compares every intermediate YK and the final T with the reference
// X_i = AES(X_{i-1} xor B_i); checks that the last result arrives
// 11 + 10*(n-1) cycles after the first start.
module tb_aes_cbcmac;
  import ccmp_ref_pkg::*;
  logic clk = 0, rst, start, sel, done, busy;
  logic [127:0] bx, tk, yk;
  logic [63:0] t;
  int checks = 0, failures = 0;
  int cyc_now = 0;

  aes_cbcmac dut (.clk, .rst, .start, .sel, .bx, .tk, .yk, .t, .done, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) cyc_now <= cyc_now + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] x, blocks [6];
    int t0;
    rst = 1; start = 0; sel = 0; bx = '0; tk = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int trial = 0; trial < 12; trial++) begin
      int n;
      n = 1 + trial % 6;
      tk = rand128();
      foreach (blocks[i]) blocks[i] = rand128();
      @(negedge clk);
      t0 = cyc_now;
      x = '0;
      for (int b = 0; b < n; b++) begin
        start = 1;
        @(negedge clk);
        start = 0;
        // round 1: the block and the chaining select are sampled now
        sel = (b != 0);
        bx  = blocks[b];
        if (b > 0) begin
          checks++;
          if (!done || yk !== x) begin failures++; $display("trial %0d yk %0d", trial, b - 1); end
        end
        x = aes_enc(tk, (b == 0) ? blocks[0] : (x ^ blocks[0+b]));
        repeat (9) @(negedge clk);
      end
      @(negedge clk);
      checks += 3;
      if (!done) failures++;
      if (cyc_now - t0 != 11 + 10*(n-1)) begin failures++; $display("latency %0d", cyc_now - t0); end
      if (t !== x[127:64]) begin failures++; $display("trial %0d T %h exp %h", trial, t, x[127:64]); end
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
