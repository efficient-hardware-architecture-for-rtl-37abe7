// control_ccmp: main controller of the AES-CCMP engine (Control_CCMP).
//
// A frame is processed as n = m + 3 CBC-MAC blocks (B0, two AAD blocks, m
// payload blocks) in fixed ten-cycle slots, with the CTR core encrypting
// A_0..A_m in the same slots.  The FSM walks START -> NC -> AAD -> PAY -> END;
// its state sets the block multiplexer (SRC_NQ, SRC_AAD, SRC_PAY) and a 4-bit
// slot counter (0..9) times each block load.  Every load starts the CBC-MAC
// core and takes the block out of its formatter.  The per-block control of
// the CCM engine is derived from the CBC-MAC completions (mac_done):
//   * the first completion also carries S0 from the CTR core -> regs;
//   * every completion shifts the key-stream delay line            -> wr;
//   * the completion that precedes a payload slot makes the ciphertext of
//     that slot valid one cycle later                            -> cipher_valid;
//   * the last completion carries T                              -> regt,
//     and U is valid one cycle later                             -> mic_valid.
// start_fcb is given together with the accepted start, so that Format_CB
// announces A_0 in the NC cycle, in step with the load of B0.
//
// The state names, the 2-bit source codes and the 4-bit slot counter follow
// the original architecture; the fixed slot grid (instead of handshakes with
// the formatters) and the way the register strobes are derived are this
// design's own choices.
//
// Timing: start in cycle s; B0 is loaded in s+1 (c0); block k is loaded in
// c0 + 10k; ciphertext block i (1..m) is valid in c0 + 10(i+2) + 2; mic_valid
// is high in c0 + 10n + 2.
module control_ccmp
  import ccmp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [15:0] m,            // payload blocks, ceil(Q/16)
  input  logic        mac_done,
  output src_sel_e    selmux,
  output logic        load,         // load BX register, start CBC-MAC
  output logic        sel,          // CBC-MAC: chain with previous YK
  output logic        start_fa,
  output logic        start_fcb,
  output logic        regs,
  output logic        regt,
  output logic        wr,
  output logic        cipher_valid,
  output logic        cipher_last,
  output logic        mic_valid,
  output logic        busy
);

  typedef enum logic [2:0] {S_START, S_NC, S_AAD, S_PAY, S_END} state_e;

  state_e      state;
  logic [3:0]  count;     // slot counter (COUNTER04)
  logic [16:0] blk;       // index of the block in the BX register
  logic [16:0] dcnt;      // CBC-MAC blocks completed
  logic [16:0] n_last;    // index of the final block, m + 2
  logic        slot_end;

  assign n_last   = {1'b0, m} + 17'd2;
  assign slot_end = (count == 4'd9);

  always_comb begin
    selmux    = SRC_NQ;
    load      = 1'b0;
    start_fa  = 1'b0;
    start_fcb = 1'b0;
    unique case (state)
      S_START: start_fcb = start;
      S_NC: begin
        load     = 1'b1;
        start_fa = 1'b1;
      end
      S_AAD: begin
        selmux = SRC_AAD;
        load   = slot_end;
      end
      S_PAY: begin
        selmux = SRC_PAY;
        load   = slot_end;
      end
      default: ;
    endcase
    wr   = mac_done;
    regs = mac_done && (dcnt == 17'd0);
    regt = mac_done && (dcnt == n_last);
    busy = (state != S_START);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_START;
      count        <= '0;
      blk          <= '0;
      dcnt         <= '0;
      sel          <= 1'b0;
      cipher_valid <= 1'b0;
      cipher_last  <= 1'b0;
      mic_valid    <= 1'b0;
    end else begin
      cipher_valid <= mac_done && (blk >= 17'd3) && (dcnt + 17'd1 == blk);
      cipher_last  <= mac_done && (blk >= 17'd3) && (blk == n_last) &&
                      (dcnt + 17'd1 == blk);
      mic_valid    <= regt;
      if (mac_done) dcnt <= dcnt + 17'd1;
      count <= slot_end ? 4'd0 : count + 4'd1;
      if (load) begin
        sel <= (state != S_NC);
        blk <= (state == S_NC) ? 17'd0 : blk + 17'd1;
      end
      unique case (state)
        S_START: if (start) state <= S_NC;
        S_NC: begin
          count <= '0;
          dcnt  <= '0;
          state <= S_AAD;
        end
        S_AAD: if (slot_end && blk == 17'd1)
          state <= (m == 16'd0) ? S_END : S_PAY;
        S_PAY: if (slot_end && blk + 17'd1 == n_last) state <= S_END;
        S_END: if (regt) state <= S_START;
        default: state <= S_START;
      endcase
    end
  end

endmodule
