// format_cb: generates the CTR counter blocks A_i (Format_CB).
//
// A_i = 8'h01 | nonce | i, where 8'h01 holds L' = 3'b001 and i comes from a
// 16-bit counter.  A four-state control (START, INITIAL_BLOCK, WAIT_128,
// NEW_BLOCK) pulses flag_cb when a fresh counter block is on cb: once for A_0
// one cycle after start_fcb, then every ten cycles for A_1..A_last, matching
// the ten-cycle block time of the AES core.  A 4-bit cycle counter runs in the
// waiting state and ends it when it reaches 4'b1000.  a_cb pulses after the
// last block has been announced.
//
// The four states, the 4-bit counter and its compare value follow the
// original controller; the stop condition (last, a_cb) is added here.
//
// Interface: start_fcb (one cycle), last = index of the final counter block
// (the number of payload blocks).  cb stays stable for the ten cycles that
// follow each flag_cb pulse.
module format_cb
  import ccmp_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start_fcb,
  input  logic [103:0] nonce,
  input  logic [15:0]  last,
  output block_t       cb,
  output logic         flag_cb,
  output logic         a_cb
);

  typedef enum logic [1:0] {S_START, S_INIT, S_WAIT, S_NEW} state_e;

  state_e      state;
  logic [3:0]  count;
  logic [15:0] ctr;     // Counter_16Bit

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_START;
      count <= '0;
      ctr   <= '0;
      a_cb  <= 1'b0;
    end else begin
      a_cb <= 1'b0;
      unique case (state)
        S_START: if (start_fcb) begin
          ctr   <= '0;
          state <= S_INIT;
        end
        S_INIT, S_NEW: begin
          count <= '0;
          if (ctr == last) begin
            state <= S_START;
            a_cb  <= 1'b1;
          end else begin
            state <= S_WAIT;
          end
        end
        S_WAIT: begin
          count <= count + 4'd1;
          if (count == 4'b1000) begin
            ctr   <= ctr + 16'd1;
            state <= S_NEW;
          end
        end
        default: state <= S_START;
      endcase
    end
  end

  assign flag_cb = (state == S_INIT) || (state == S_NEW);
  assign cb      = {2'b00, 3'b000, CCM_LP, nonce, ctr};

endmodule
