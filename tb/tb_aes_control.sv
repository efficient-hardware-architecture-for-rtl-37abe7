// tb_aes_control: runs the AES controller through single blocks and
// back-to-back blocks and checks, cycle by cycle, the round-1 selects, the
// round-constant sequence, the final-round flag, busy, and that done comes
// exactly eleven cycles after start.
module tb_aes_control;
  logic clk = 0, rst, start;
  logic sel_init, key_first, round_en, last, done, busy;
  logic [7:0] rcon;
  int checks = 0, failures = 0;
  logic [7:0] rc_tab [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  aes_control dut (.clk, .rst, .start, .sel_init, .key_first, .round_en, .last, .rcon, .done, .busy);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%t: %s", $time, what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run nblk blocks; gap = 0 starts the next block in round 10.
  task automatic run(int nblk, int gap);
    for (int b = 0; b < nblk; b++) begin
      start = 1;
      @(negedge clk);
      start = 0;
      for (int r = 1; r <= 10; r++) begin
        chk(round_en && busy, "round_en/busy in a round");
        chk(sel_init == (r == 1) && key_first == (r == 1), "round-1 selects");
        chk(last == (r == 10), "last flag");
        chk(rcon == rc_tab[r-1], "rcon value");
        chk(done == (r == 1 && b > 0 && gap == 0), "done only after round 10");
        if (r == 10 && b < nblk - 1 && gap == 0) start = 1;
        else if (r < 10) @(negedge clk);
      end
      if (gap == 0 && b < nblk - 1) continue;
      @(negedge clk);
      chk(done, "done eleven cycles after start");
      chk(!busy, "idle after done");
      @(negedge clk);
      chk(!done, "done is a pulse");
      repeat (gap) @(negedge clk);
    end
  endtask

  initial begin
    rst = 1; start = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk(!busy && !done, "idle after reset");
    run(2, 3);
    run(4, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
