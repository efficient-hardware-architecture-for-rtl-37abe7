// format_payload: cuts the plaintext payload into 128-bit blocks (Format_Payload).
//
// The payload arrives two octets per cycle on plain_pay (first octet in bits
// [15:8]).  Each octet passes a multiplexer that substitutes 8'h00 once the Q
// payload octets are used up, and the resulting 16-bit word is shifted into a
// 128-bit register; eight words make a block, so the last block is
// zero-padded.  The number of blocks is ceil(Q/16).
//
// The two octet multiplexers with 8'h00 padding and the 16-bit word width
// follow the original architecture; the FSM is this design's own.
//
// Control (Control_FormatPayload): IDLE -> FILL (8 words) -> HOLD (flag_fp
// high, block on pay_pay) -> on consume FILL again, or back to IDLE with a_py
// pulsed in that cycle after the last block.  pay_rd is high in each cycle
// that takes a word from plain_pay, which must then be valid; for an odd Q
// only the upper octet of the last word is used.  A start with Q = 0 pulses
// a_py at once.
module format_payload
  import ccmp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start_fp,
  input  logic [15:0] q,          // payload length in octets
  input  logic [15:0] plain_pay,
  input  logic        consume,
  output logic        pay_rd,
  output block_t      pay_pay,
  output logic        flag_fp,
  output logic        a_py
);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_HOLD} state_e;

  state_e      state;
  logic [15:0] rem;        // payload octets not yet taken
  logic [2:0]  wi;         // word index inside the block
  logic [7:0]  byte_hi, byte_lo;
  block_t      reg_q;

  assign byte_hi = (rem != 16'd0) ? plain_pay[15:8] : 8'h00;
  assign byte_lo = (rem >  16'd1) ? plain_pay[7:0]  : 8'h00;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      rem   <= '0;
      wi    <= '0;
      reg_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start_fp && q != 16'd0) begin
          rem   <= q;
          wi    <= '0;
          state <= S_FILL;
        end
        S_FILL: begin
          reg_q <= {reg_q[111:0], byte_hi, byte_lo};
          rem   <= (rem > 16'd1) ? rem - 16'd2 : 16'd0;
          wi    <= wi + 3'd1;
          if (wi == 3'd7) state <= S_HOLD;
        end
        S_HOLD: if (consume) state <= (rem == 16'd0) ? S_IDLE : S_FILL;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign pay_rd  = (state == S_FILL) && (rem != 16'd0);
  assign pay_pay = reg_q;
  assign flag_fp = (state == S_HOLD);
  assign a_py    = ((state == S_HOLD) && consume && (rem == 16'd0)) ||
                   ((state == S_IDLE) && start_fp && (q == 16'd0));

endmodule
