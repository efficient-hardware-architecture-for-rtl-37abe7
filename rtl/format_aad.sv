// format_aad: builds the two 128-bit AAD blocks of a CCMP frame (Format_AAD).
//
// The CCM AAD block pair is: the 16-bit AAD length l(a), the masked Frame
// Control (FC), addresses A1..A3, the masked Sequence Control (SC), the
// optional A4 and QoS Control (QC) fields, then zero padding to 256 bits.
// Sixteen 16-bit words are shifted into REG_128BIT, one per cycle, each chosen
// by a four-way multiplexer: the AAD input word, zeros, the masked SC word or
// the masked FC word.  The word order depends on flag_a4 / flag_qc; with both
// set, l(a) plus the 240-bit AAD fill both blocks exactly.
//
//   * Masked FC: the 9-bit fc input holds the FC bits that survive masking,
//     {b15, b10..b7, b3..b0}; subtype bits b6..b4 and Retry/PwrMgt/MoreData
//     (b13..b11) become 0 and the Protected bit b14 becomes 1.
//   * Masked SC: only the 4-bit fragment number sc survives; the sequence
//     number is zeroed.
//   * FC and SC are little-endian 802.11 fields, so their low octet is placed
//     first.  All other words (l(a), addresses, QC) are taken as given, first
//     octet in bits [15:8].
//
// The 16-bit word width and the four multiplexer sources follow the original
// architecture.  Taking l(a) from the AAD input, the FSM and the octet order
// are this design's own choices.
//
// Control (FSM): IDLE -> FILL (8 words) -> HOLD (flag_fa = 1, block on
// pay_aad) -> on consume FILL (8 more words) -> HOLD -> on consume back to
// IDLE with a_ad pulsed in that same cycle.  aad_rd is high in each cycle
// that takes a word from the aad input, which must then be valid (show-ahead
// FIFO style).  The host supplies, in order: l(a), A1, A2, A3, [A4], [QC].
module format_aad
  import ccmp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start_fa,
  input  logic        flag_a4,
  input  logic        flag_qc,
  input  logic [15:0] aad,
  input  logic [3:0]  sc,
  input  logic [8:0]  fc,
  input  logic        consume,   // block on pay_aad taken by the datapath
  output logic        aad_rd,
  output block_t      pay_aad,
  output logic        flag_fa,   // a complete block is on pay_aad
  output logic        a_ad       // second block consumed, AAD finished
);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_HOLD} state_e;
  typedef enum logic [1:0] {W_AAD, W_ZERO, W_SC, W_FC} word_sel_e;

  state_e    state;
  logic [3:0] wi;          // index of the next word, 0..15
  word_sel_e sel;
  logic [4:0] aad_end;     // first padding word index
  logic [15:0] word, fc16, sc16;
  block_t    reg_q;

  assign fc16 = {fc[8], 1'b1, 3'b000, fc[7:4], 3'b000, fc[3:0]};
  assign sc16 = {12'h000, sc};
  assign aad_end = 5'd12 + (flag_a4 ? 5'd3 : 5'd0) + (flag_qc ? 5'd1 : 5'd0);

  always_comb begin
    if (wi == 4'd1)                sel = W_FC;
    else if (wi == 4'd11)          sel = W_SC;
    else if ({1'b0, wi} < aad_end) sel = W_AAD;
    else                           sel = W_ZERO;
    unique case (sel)
      W_AAD:  word = aad;
      W_ZERO: word = 16'h0000;
      W_SC:   word = {sc16[7:0], sc16[15:8]};
      W_FC:   word = {fc16[7:0], fc16[15:8]};
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      wi    <= '0;
      reg_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start_fa) begin
          wi    <= '0;
          state <= S_FILL;
        end
        S_FILL: begin
          reg_q <= {reg_q[111:0], word};
          wi    <= wi + 4'd1;
          if (wi[2:0] == 3'd7) state <= S_HOLD;
        end
        S_HOLD: if (consume) state <= (wi == 4'd0) ? S_IDLE : S_FILL;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign aad_rd  = (state == S_FILL) && (sel == W_AAD);
  assign pay_aad = reg_q;
  assign flag_fa = (state == S_HOLD);
  assign a_ad    = (state == S_HOLD) && consume && (wi == 4'd0);

endmodule
