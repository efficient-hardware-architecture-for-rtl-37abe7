// tb_aes_genkey: steps the key generator through rounds 1..10 for several
// keys (the FIPS-197 key and random ones), supplying the round constants a
// controller would, and compares each round key with the reference schedule.
module tb_aes_genkey;
  import ccmp_ref_pkg::*;
  logic clk = 0, en, first;
  logic [7:0] rcon;
  logic [127:0] key, round_key;
  int checks = 0, failures = 0;
  logic [7:0] rc_tab [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  aes_genkey dut (.clk, .en, .first, .rcon, .key, .round_key);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; first = 0; rcon = 0;
    for (int k = 0; k < 20; k++) begin
      key = (k == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : rand128();
      for (int r = 1; r <= 10; r++) begin
        @(negedge clk);
        first = (r == 1); en = 1; rcon = rc_tab[r-1];
        #1;
        checks++;
        if (round_key !== ref_round_key(key, r)) begin
          failures++;
          if (failures < 5) $display("key %0d round %0d: %h exp %h", k, r, round_key, ref_round_key(key, r));
        end
      end
      @(negedge clk);
      en = 0;
    end
    // FIPS-197 A.1: last round key of 2b7e...
    checks++;
    if (ref_round_key(128'h2b7e151628aed2a6abf7158809cf4f3c, 10) !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
