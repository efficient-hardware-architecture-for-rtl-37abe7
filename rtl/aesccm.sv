// aesccm: the CCM engine, CBC-MAC and CTR side by side (AESCCM).
//
// Two independent AES cores run in parallel under one temporal key: the
// authenticator computes T over the formatted blocks BX, the cipher encrypts
// the counter blocks CB, produces the ciphertext of each payload block from
// the same BX bus, and finally U = T XOR S0.  This module only wires the two
// halves together; all sequencing comes from the main controller.
//
// Timing: see aes_cbcmac and aes_ctr; both cores take ten cycles per block.
module aesccm
  import ccmp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start_mac,   // start the CBC-MAC core
  input  logic        start_ctr,   // start the CTR core
  input  logic        sel,
  input  block_t      tk,
  input  block_t      bx,
  input  block_t      cb,
  input  logic        regt,
  input  logic        regs,
  input  logic        wr,
  output logic [63:0] t,
  output logic [63:0] u,
  output block_t      cipher_mpdu,
  output logic        mac_done,
  output logic        ctr_done
);

  block_t yk, sx;
  logic   mac_busy, ctr_busy;

  aes_cbcmac u_mac (
    .clk, .rst, .start(start_mac), .sel, .bx, .tk,
    .yk, .t, .done(mac_done), .busy(mac_busy)
  );

  aes_ctr u_ctr (
    .clk, .rst, .start(start_ctr), .cb, .tk, .bx, .t,
    .regt, .regs, .wr, .sx, .u, .cipher_mpdu,
    .done(ctr_done), .busy(ctr_busy)
  );

endmodule
