// aes_cbcmac: CBC-MAC authenticator of CCM (AESCBCMAC).
//
// The first block BX goes straight into the AES core; for every later block
// the control input sel routes BX XOR YK (YK = previous AES output) instead.
// After the last block, the MIC T is the upper 64 bits (the first eight
// octets) of YK.
//
// Timing: as aes_cipher: start in cycle t, bx and sel are sampled in t+1,
// yk/t are valid with done in t+11.  Issuing the next start in t+10 makes the
// previous YK visible exactly in the cycle the next block is sampled.
module aes_cbcmac
  import ccmp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        sel,    // 0: first block, 1: chain with YK
  input  block_t      bx,
  input  block_t      tk,
  output block_t      yk,
  output logic [63:0] t,
  output logic        done,
  output logic        busy
);

  block_t sx01, aes_in;

  assign sx01   = bx ^ yk;
  assign aes_in = sel ? sx01 : bx;

  aes_cipher u_aes (
    .clk, .rst, .start, .plain(aes_in), .key(tk),
    .cipherdata(yk), .done, .busy
  );

  assign t = yk[127:64];

endmodule
