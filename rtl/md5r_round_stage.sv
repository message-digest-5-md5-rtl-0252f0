// md5r_round_stage: one hashing pipeline stage of a solver worker, running
// MD5 round ROUND (0..63) in one clock.
//
// The stage computes
//   B' = B + rotl(A + F(B, C, D) + K[ROUND] + m[g], s),  A' = D, C' = B, D' = C
// where F is the function of the round's group of 16 (equations (1)-(4) of
// md5_pkg), g the round's message word and s its rotation. The message block,
// the candidate string and its valid flag travel with the state, so that
// every stage holds a different string and the pipeline accepts a new string
// every clock. Stage 0 is fed the initial MD5 state by the worker.
// One round per stage and the four functions follow the design description;
// the constants and message-word order come from the MD5 standard.
//
// Interface: all outputs are registered, one clock after the inputs. valid
// is cleared by the synchronous reset, so strings issued before the pipeline
// filled never count as results; data registers are not reset.
module md5r_round_stage
  import md5_pkg::*;
  import md5r_pkg::*;
#(
  parameter int unsigned ROUND = 0
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     valid_in,
  input  block_t   m_in,
  input  word64_t  word_in,
  input  wordlen_t wordlen_in,
  input  state_t   state_in,
  output logic     valid_out,
  output block_t   m_out,
  output word64_t  word_out,
  output wordlen_t wordlen_out,
  output state_t   state_out
);

  localparam int unsigned G = msg_index(ROUND);
  localparam int unsigned S = shift_amount(ROUND);
  localparam word_t       K = K_TABLE[ROUND];

  state_t s_next;

  always_comb begin
    s_next.a = state_in.d;
    s_next.c = state_in.b;
    s_next.d = state_in.c;
    s_next.b = state_in.b + rotl(state_in.a + round_fn(ROUND, state_in.b, state_in.c, state_in.d)
                                 + K + m_in[G], S);
  end

  always_ff @(posedge clk) begin
    if (rst) valid_out <= 1'b0;
    else     valid_out <= valid_in;
    m_out       <= m_in;
    word_out    <= word_in;
    wordlen_out <= wordlen_in;
    state_out   <= s_next;
  end

  initial assert (ROUND < 64) else $fatal(1, "ROUND must be 0..63");

endmodule
