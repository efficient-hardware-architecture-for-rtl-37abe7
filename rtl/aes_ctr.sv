// aes_ctr: counter-mode cipher of CCM and MIC encryption (AESCTR).
//
// Counter blocks CB are encrypted by the AES core into key-stream blocks SX.
// The first one, S0, only encrypts the MIC: its upper 64 bits are stored when
// regs is high, the CBC-MAC value T is stored when regt is high, and
// U = S0[127:64] XOR T.  Later key-stream blocks pass through a two-register
// delay line, shifted by wr, so that S_i meets payload block P_i on the
// shared BX bus; CIPHER_MPDU = delayed S XOR BX.
//
// The register set follows the original block diagram; the two-stage delay
// length follows from this design's slot schedule (CTR starts with B0).
//
// Timing: the AES core behaves as in aes_cipher (start t, cb sampled t+1,
// sx valid with done t+11).  The delay registers update on the clock edge
// that ends a cycle with wr high.
module aes_ctr
  import ccmp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  block_t      cb,
  input  block_t      tk,
  input  block_t      bx,
  input  logic [63:0] t,
  input  logic        regt,   // store T
  input  logic        regs,   // store S0
  input  logic        wr,     // shift the key-stream delay line
  output block_t      sx,
  output logic [63:0] u,
  output block_t      cipher_mpdu,
  output logic        done,
  output logic        busy
);

  logic [63:0] s0_q, t_q;
  block_t      s1_q, s2_q;

  aes_cipher u_aes (
    .clk, .rst, .start, .plain(cb), .key(tk),
    .cipherdata(sx), .done, .busy
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      s0_q <= '0;
      t_q  <= '0;
      s1_q <= '0;
      s2_q <= '0;
    end else begin
      if (regs) s0_q <= sx[127:64];
      if (regt) t_q  <= t;
      if (wr) begin
        s1_q <= sx;
        s2_q <= s1_q;
      end
    end
  end

  assign u           = s0_q ^ t_q;
  assign cipher_mpdu = s2_q ^ bx;

endmodule
