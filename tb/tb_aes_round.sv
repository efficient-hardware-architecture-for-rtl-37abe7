// tb_aes_round: applies random states and round keys to one registered AES
// round, with and without the final-round MixColumns bypass, and compares
// the stored result with the reference round; also checks that the register
// holds its value while en is low.
module tb_aes_round;
  import ccmp_ref_pkg::*;
  logic clk = 0, en, last;
  logic [127:0] state_in, round_key, state_q, exp_q;
  int checks = 0, failures = 0;

  aes_round dut (.clk, .en, .last, .state_in, .round_key, .state_q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; last = 0; state_in = '0; round_key = '0;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      state_in = rand128(); round_key = rand128(); last = (k % 3 == 0); en = 1;
      exp_q = round_ref(state_in, round_key, last);
      @(negedge clk);
      en = 0;
      checks++;
      if (state_q !== exp_q) begin
        failures++;
        if (failures < 5) $display("round %0d last=%0b: got %h exp %h", k, last, state_q, exp_q);
      end
      state_in = rand128();
      @(negedge clk);
      checks++;
      if (state_q !== exp_q) failures++;
    end
    // FIPS-197 appendix B, round 1 input (after initial AddRoundKey)
    @(negedge clk);
    state_in  = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    round_key = 128'ha0fafe1788542cb123a339392a6c7605;
    last = 0; en = 1;
    @(negedge clk);
    en = 0;
    checks++;
    if (state_q !== 128'ha49c7ff2689f352b6b5bea43026a5049) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
