// aes_control: 12-state controller of the iterative AES-128 core.
//
// States: IDLE, R1..R10 (one per round) and DONE.  START is accepted in IDLE,
// DONE and R10, so blocks can follow each other every ten cycles.  In R1 the
// core's input multiplexer selects plaintext XOR key (the initial round) and
// the key generator expands from the cipher key; in R2..R10 both use their
// feedback registers.  R10 suppresses MixColumns.  The 8-bit round constant
// for the key generator is produced here.
//
// The twelve-state count follows the original design; the choice of states
// and their transitions are this design's own.
//
// Timing: START in cycle t; rounds in t+1..t+10; done is high in cycle t+11
// (and the ciphertext is then valid) whether or not a new block has begun.
// busy is high in R1..R10.
module aes_control
  import ccmp_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  output logic  sel_init,   // input mux: plaintext ^ key (round 1)
  output logic  key_first,  // key generator expands from the cipher key
  output logic  round_en,   // round and key registers load
  output logic  last,       // final round, no MixColumns
  output byte_t rcon,
  output logic  done,
  output logic  busy
);

  typedef enum logic [3:0] {
    S_IDLE, S_R1, S_R2, S_R3, S_R4, S_R5, S_R6, S_R7, S_R8, S_R9, S_R10, S_DONE
  } state_e;

  state_e state, state_n;

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE, S_DONE: state_n = start ? S_R1 : S_IDLE;
      S_R10:          state_n = start ? S_R1 : S_DONE;
      default:        state_n = state_e'(state + 4'd1);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
    end else begin
      state <= state_n;
      done  <= (state == S_R10);
    end
  end

  always_comb begin
    sel_init  = (state == S_R1);
    key_first = (state == S_R1);
    last      = (state == S_R10);
    round_en  = (state inside {[S_R1:S_R10]});
    busy      = round_en;
    rcon      = 8'h00;
    unique case (state)
      S_R1:    rcon = 8'h01;
      S_R2:    rcon = 8'h02;
      S_R3:    rcon = 8'h04;
      S_R4:    rcon = 8'h08;
      S_R5:    rcon = 8'h10;
      S_R6:    rcon = 8'h20;
      S_R7:    rcon = 8'h40;
      S_R8:    rcon = 8'h80;
      S_R9:    rcon = 8'h1b;
      S_R10:   rcon = 8'h36;
      default: rcon = 8'h00;
    endcase
  end

endmodule
