// aesccmp: AES-CCMP encryption engine for IEEE 802.11i frames (top level).
//
// Given the temporal key TK, the 104-bit CCM nonce, the MAC-header fields
// that make up the AAD and the plaintext payload, the engine produces the
// CTR-encrypted payload, 128 bits at a time, and the 64-bit encrypted MIC U.
// Two AES-128 cores run in parallel: one computes the CBC-MAC over B0, the
// two AAD blocks and the payload blocks; the other encrypts the counter blocks
// A_0..A_m.  Three formatters build the blocks from narrow inputs (16-bit AAD
// and payload words), a multiplexer and register (BX) feed the CBC-MAC core,
// and Control_CCMP runs everything in ten-cycle slots.  B0 is a fixed
// arrangement of inputs and is wired here directly.
//
// Interface: hold q, n, tk, fc, sc, flag_a4, flag_qc, data and reserved stable
// from start until mic_valid.  aad words are taken when aad_rd is high, in the
// order l(a), A1, A2, A3, [A4], [QC]; payload words (two octets, first in
// [15:8]) when pay_rd is high; both must be valid in that same cycle.
// ciphertext is valid while cipher_valid is high (one cycle per payload block,
// cipher_last marks the final block, whose octets past Q are not meaningful).
// mic is valid from the mic_valid pulse until the next frame starts.
//
// Timing: for m = ceil(Q/16) payload blocks, mic_valid comes 10*(m+3) + 3
// cycles after start; the 64-block (1024-octet) frame takes 673 cycles.
module aesccmp
  import ccmp_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [15:0]  q,          // payload length in octets
  input  logic [103:0] n,          // CCM nonce: priority | A2 | PN
  input  logic [15:0]  aad,
  input  logic [3:0]   sc,         // fragment number of Sequence Control
  input  logic [8:0]   fc,         // unmasked bits of Frame Control
  input  logic         flag_a4,
  input  logic         flag_qc,
  input  logic         data,       // B0 Adata flag
  input  logic         reserved,   // B0 reserved flag bit
  input  logic [15:0]  plaintext,
  input  block_t       tk,
  output logic         aad_rd,
  output logic         pay_rd,
  output logic [63:0]  mic,
  output block_t       ciphertext,
  output logic         cipher_valid,
  output logic         cipher_last,
  output logic         mic_valid,
  output logic         busy
);

  block_t      pay_nq, pay_aad, pay_pay, cb, mux_out, bx_q;
  src_sel_e    selmux;
  logic        load, sel, start_fa, start_fcb, regs, regt, wr;
  logic        flag_fa, a_ad, flag_fp, a_py, flag_cb, a_cb;
  logic        mac_done, ctr_done;
  logic [63:0] t;
  logic [15:0] m;

  assign m = 16'((17'(q) + 17'd15) >> 4);

  control_ccmp u_ctrl (
    .clk, .rst, .start, .m, .mac_done,
    .selmux, .load, .sel, .start_fa, .start_fcb, .regs, .regt, .wr,
    .cipher_valid, .cipher_last, .mic_valid, .busy
  );

  // Initial block B0 (Format_N&Q): flags {Reserved, Adata, M' = 011,
  // L' = 001}, the nonce and the payload length; plain wiring.
  assign pay_nq = {reserved, data, CCM_MP, CCM_LP, n, q};

  format_aad u_faad (
    .clk, .rst, .start_fa, .flag_a4, .flag_qc, .aad, .sc, .fc,
    .consume(load && selmux == SRC_AAD),
    .aad_rd, .pay_aad, .flag_fa, .a_ad
  );

  format_payload u_fpay (
    .clk, .rst, .start_fp(a_ad), .q, .plain_pay(plaintext),
    .consume(load && selmux == SRC_PAY),
    .pay_rd, .pay_pay, .flag_fp, .a_py
  );

  format_cb u_fcb (
    .clk, .rst, .start_fcb, .nonce(n), .last(m),
    .cb, .flag_cb, .a_cb
  );

  always_comb begin
    unique case (selmux)
      SRC_AAD: mux_out = pay_aad;
      SRC_PAY: mux_out = pay_pay;
      default: mux_out = pay_nq;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)       bx_q <= '0;
    else if (load) bx_q <= mux_out;
  end

  aesccm u_ccm (
    .clk, .rst,
    .start_mac(load), .start_ctr(flag_cb), .sel, .tk,
    .bx(bx_q), .cb, .regt, .regs, .wr,
    .t, .u(mic), .cipher_mpdu(ciphertext), .mac_done, .ctr_done
  );

  // The fixed slot schedule relies on every formatter being ready in time
  // and on the two cores starting together.
  always_ff @(posedge clk) begin
    if (!rst) begin
      if (load && selmux == SRC_AAD) assert (flag_fa) else $error("AAD block not ready");
      if (load && selmux == SRC_PAY) assert (flag_fp) else $error("payload block not ready");
      if (flag_cb) assert (load) else $error("CTR start outside a slot boundary");
    end
  end

endmodule
