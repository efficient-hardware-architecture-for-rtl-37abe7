// aes_round: one AES-128 encryption round with its state register.
//
// Each enabled clock applies SubBytes, ShiftRows, MixColumns and AddRoundKey
// to the 128-bit input and stores the result.  On the last round
// (last = 1) MixColumns is bypassed by a multiplexer, as AES prescribes for
// round 10.  The sixteen SubBytes lookups use eight dual-port S-box memories.
// The initial AddRoundKey is not done here: the parent XORs plaintext and
// key before the input multiplexer.
//
// Interface: state_in and round_key are combinational inputs; state_q is the
// registered round output.  Timing: one round per enabled cycle.
module aes_round
  import ccmp_pkg::*;
(
  input  logic   clk,
  input  logic   en,         // store the round result
  input  logic   last,       // final round: skip MixColumns
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_q
);

  block_t sub, shifted, mixed, next;

  for (genvar i = 0; i < 8; i++) begin : g_sbox
    aes_sbox_dp u_sbox (
      .addr_a (state_in[127 - 16*i -: 8]),
      .addr_b (state_in[119 - 16*i -: 8]),
      .data_a (sub[127 - 16*i -: 8]),
      .data_b (sub[119 - 16*i -: 8])
    );
  end

  always_comb begin
    shifted = shift_rows(sub);
    for (int c = 0; c < 4; c++)
      mixed[127 - 32*c -: 32] = mix_column(shifted[127 - 32*c -: 32]);
    next = (last ? shifted : mixed) ^ round_key;
  end

  always_ff @(posedge clk) begin
    if (en) state_q <= next;
  end

endmodule
