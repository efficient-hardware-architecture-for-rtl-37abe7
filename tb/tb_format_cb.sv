// tb_format_cb: starts the counter-block generator for several block counts
// and checks that flag_cb pulses once one cycle after start and then every
// ten cycles, that each announced block is A_i = 01 | nonce | i and stays on
// cb for ten cycles, that exactly last+1 blocks are announced and a_cb
// follows the last one.
module tb_format_cb;
  logic clk = 0, rst, start_fcb, flag_cb, a_cb;
  logic [103:0] nonce;
  logic [15:0] last;
  logic [127:0] cb;
  int checks = 0, failures = 0;

  format_cb dut (.clk, .rst, .start_fcb, .nonce, .last, .cb, .flag_cb, .a_cb);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%t: %s", $time, what); end
  endtask

  initial begin
    rst = 1; start_fcb = 0; nonce = '0; last = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 5; k++) begin
      int cnt, acnt;
      cnt = 0; acnt = 0;
      nonce = {$urandom, $urandom, $urandom, $urandom};
      last = 16'(k * 2);
      @(negedge clk);
      start_fcb = 1;
      @(negedge clk);
      start_fcb = 0;
      for (int c = 0; c < 10 * (k * 2 + 1) + 15; c++) begin
        bit due;
        due = (c % 10 == 0) && (c / 10 <= k * 2);
        chk(flag_cb == due, $sformatf("flag_cb at %0d", c));
        if (c / 10 <= k * 2)
          chk(cb == {8'h01, nonce, 16'(c / 10)}, $sformatf("cb at %0d", c));
        if (flag_cb) cnt++;
        if (a_cb) acnt++;
        @(negedge clk);
      end
      chk(cnt == k * 2 + 1, "block count");
      chk(acnt == 1, "a_cb once");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
