// tb_format_payload: feeds payloads of many lengths (empty, odd, one octet
// short of a block, exact blocks, 1024 octets) two octets per read and checks
// every 128-bit block against the zero-padded reference, the block count
// ceil(Q/16), the eight-word fill time, the hold until consume, the number
// of words read, and the a_py pulse.
module tb_format_payload;
  import ccmp_ref_pkg::*;
  logic clk = 0, rst, start_fp, consume, pay_rd, flag_fp, a_py;
  logic [15:0] q, plain_pay;
  logic [127:0] pay_pay;
  int checks = 0, failures = 0;

  format_payload dut (.clk, .rst, .start_fp, .q, .plain_pay, .consume,
                      .pay_rd, .pay_pay, .flag_fp, .a_py);

  always #5 clk = ~clk;

  logic [15:0] pw [512];
  int pi;
  assign plain_pay = pw[pi[8:0]];
  always @(posedge clk) if (pay_rd) pi <= pi + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%t: %s", $time, what); end
  endtask

  initial begin
    int lens [10] = '{0, 1, 2, 15, 16, 17, 33, 47, 64, 1024};
    rst = 1; start_fp = 0; consume = 0; q = 0; pi = 0;
    foreach (pw[i]) pw[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    foreach (lens[k]) begin
      bytes_q pay;
      int nb, apy;
      pay.delete();
      for (int i = 0; i < lens[k]; i++) pay.push_back(u8'($urandom));
      foreach (pw[i]) pw[i] = 16'($urandom);      // junk beyond the payload
      for (int i = 0; i < lens[k]; i += 2)
        pw[i/2] = {pay[i], (i + 1 < lens[k]) ? pay[i+1] : 8'($urandom)};
      nb = (lens[k] + 15) / 16;
      @(negedge clk);
      pi = 0; q = 16'(lens[k]);
      start_fp = 1;
      #1;
      apy = a_py;
      @(negedge clk);
      start_fp = 0;
      if (nb == 0) chk(apy == 1 && !flag_fp, "empty payload finishes at once");
      for (int b = 0; b < nb; b++) begin
        repeat (8) begin chk(!flag_fp, "not ready while filling"); @(negedge clk); end
        chk(flag_fp, "ready after eight words");
        chk(pay_pay == blk_of(pay, 16*b), $sformatf("len %0d block %0d: %h exp %h", lens[k], b, pay_pay, blk_of(pay, 16*b)));
        repeat ($urandom_range(0, 2)) begin @(negedge clk); chk(flag_fp, "held"); end
        consume = 1;
        #1;
        chk(a_py == (b == nb - 1), "a_py on the last consume");
        @(negedge clk);
        consume = 0;
      end
      chk(!flag_fp, "idle at the end");
      chk(pi == (lens[k] + 1) / 2, $sformatf("words read %0d", pi));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
