// tb_control_ccmp: runs the main controller against a model of the CBC-MAC
// core (done eleven cycles after each start) for payloads of 0..4 blocks and
// checks the schedule: loads every ten cycles, the source of each load
// (N&Q, AAD, AAD, payload...), the chaining select, start_fa and start_fcb,
// regs on the first completion, wr on every completion, cipher_valid two
// cycles after each payload load, cipher_last on the last, regt on the
// final completion and mic_valid 10*(m+3)+3 cycles after start.
module tb_control_ccmp;
  import ccmp_pkg::*;
  logic clk = 0, rst, start, mac_done;
  logic [15:0] m;
  src_sel_e selmux;
  logic load, sel, start_fa, start_fcb, regs, regt, wr, cipher_valid, cipher_last, mic_valid, busy;
  int checks = 0, failures = 0;

  control_ccmp dut (.clk, .rst, .start, .m, .mac_done, .selmux, .load, .sel, .start_fa,
                    .start_fcb, .regs, .regt, .wr, .cipher_valid, .cipher_last, .mic_valid, .busy);

  always #5 clk = ~clk;

  // CBC-MAC core model: done 11 cycles after a load
  logic [15:0] pipe;
  always @(posedge clk) pipe <= rst ? '0 : {pipe[14:0], load};
  assign mac_done = pipe[10];

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
    rst = 1; start = 0; m = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int mm = 0; mm <= 4; mm++) begin
      int n, nload, ndone, ncv;
      n = mm + 3; nload = 0; ndone = 0; ncv = 0;
      m = 16'(mm);
      @(negedge clk);
      start = 1;
      #1;
      chk(start_fcb, "start_fcb with start");
      @(negedge clk);
      start = 0;
      // c is the cycle offset from the NC cycle (c0)
      for (int c = 0; c <= 10 * n + 2; c++) begin
        bit is_load, cv_due;
        is_load = (c % 10 == 0) && (c / 10 < n);
        cv_due  = (c % 10 == 2) && (c / 10 >= 3) && (c / 10 < n);
        chk(load == is_load, $sformatf("m=%0d load at c=%0d state=%0d blk=%0d cnt=%0d", mm, c, dut.state, dut.blk, dut.count));
        chk(start_fa == (c == 0), "start_fa in the NC cycle");
        if (is_load) begin
          src_sel_e exp_src;
          exp_src = (c == 0) ? SRC_NQ : (c / 10 < 3) ? SRC_AAD : SRC_PAY;
          chk(selmux == exp_src, $sformatf("source of block %0d", c / 10));
        end
        if (c % 10 == 1 && c / 10 < n) chk(sel == (c / 10 != 0), "chaining select");
        chk(wr == mac_done, "wr on completion");
        chk(regs == (c == 11), "regs on the first completion");
        chk(regt == (c == 10 * n + 1), "regt on the final completion");
        chk(cipher_valid == cv_due, $sformatf("cipher_valid at c=%0d", c));
        chk(cipher_last == (cv_due && c / 10 == n - 1), "cipher_last");
        chk(mic_valid == (c == 10 * n + 2), "mic_valid");
        chk(busy == (c < 10 * n + 2), "busy");
        if (load) nload++;
        if (mac_done) ndone++;
        if (cipher_valid) ncv++;
        @(negedge clk);
      end
      chk(nload == n && ndone == n && ncv == mm, "block counts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
