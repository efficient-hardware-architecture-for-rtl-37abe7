// aes_cipher: iterative AES-128 encryption, one round per clock.
//
// The initial round (plaintext XOR key) is a plain XOR gate in front of the
// input multiplexer.  The multiplexer feeds either that value (round 1) or the
// fed-back round register (rounds 2..10) into aes_round; aes_genkey supplies
// the round key; aes_control sequences everything.  Ten S-box memories are
// used: eight in the round, two in the key schedule.
//
// Interface and timing: assert start for one cycle (t).  plain and key are
// sampled in cycle t+1, so a chained mode may compute plain from the previous
// ciphertext, which is still visible in that cycle.  done pulses in t+11 and
// cipherdata holds the result from t+11 until the end of the next block's
// first round.  A new start may be issued in t+10, giving one block every ten
// cycles.
module aes_cipher
  import ccmp_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  block_t plain,
  input  block_t key,
  output block_t cipherdata,
  output logic   done,
  output logic   busy
);

  logic   sel_init, key_first, round_en, last;
  byte_t  rcon;
  block_t round_in, round_key, state_q;

  aes_control u_ctrl (
    .clk, .rst, .start,
    .sel_init, .key_first, .round_en, .last, .rcon, .done, .busy
  );

  aes_genkey u_key (
    .clk, .en(round_en), .first(key_first), .rcon, .key, .round_key
  );

  assign round_in = sel_init ? (plain ^ key) : state_q;

  aes_round u_round (
    .clk, .en(round_en), .last, .state_in(round_in), .round_key, .state_q
  );

  assign cipherdata = state_q;

endmodule
