// aes_genkey: on-the-fly AES-128 key expansion, one round key per cycle.
//
// The round key for the current round is derived combinationally from the
// previous one: RotWord, SubWord through two dual-port S-box memories (four
// lookups), XOR with the round constant supplied by the controller, then the
// chained XOR of the four words.  For round 1 the previous key is the cipher
// key input (first = 1); later rounds use the key register, which stores each
// round key when en is high.
//
// Interface: rcon is the 8-bit round constant from AES_Control; round_key is
// valid combinationally in the same cycle.
module aes_genkey
  import ccmp_pkg::*;
(
  input  logic   clk,
  input  logic   en,        // store the round key just produced
  input  logic   first,     // round 1: expand from the cipher key input
  input  byte_t  rcon,
  input  block_t key,
  output block_t round_key
);

  block_t      key_q;
  block_t      prev;
  logic [31:0] rot, subw;

  assign prev = first ? key : key_q;
  assign rot  = {prev[23:0], prev[31:24]};   // RotWord of word 3

  aes_sbox_dp u_sbox0 (
    .addr_a (rot[31:24]), .addr_b (rot[23:16]),
    .data_a (subw[31:24]), .data_b (subw[23:16])
  );
  aes_sbox_dp u_sbox1 (
    .addr_a (rot[15:8]),  .addr_b (rot[7:0]),
    .data_a (subw[15:8]), .data_b (subw[7:0])
  );

  logic [31:0] w0, w1, w2, w3;
  always_comb begin
    w0 = prev[127:96] ^ subw ^ {rcon, 24'h0};
    w1 = prev[95:64]  ^ w0;
    w2 = prev[63:32]  ^ w1;
    w3 = prev[31:0]   ^ w2;
  end
  assign round_key = {w0, w1, w2, w3};

  always_ff @(posedge clk) begin
    if (en) key_q <= round_key;
  end

endmodule
