// md5r_solver_worker: one fixed-function solver worker. It hashes one
// candidate string per clock with MD5 and compares each digest with the
// target hash.
//
// Structure: a registered padding unit (md5r_pad) builds the 512-bit block,
// then 64 hashing pipeline stages (md5r_round_stage) run one MD5 round each:
// stages 0-15 use function F1, 16-31 F2, 32-47 F3 and 48-63 F4. Each stage
// carries the block, the string and a valid flag with the state, so the
// pipeline holds 65 strings at once. At the output of stage 63 the initial
// state is added and the digest is formed little-endian from A, B, C, D
// (combinational), then compared with hash.
//
// Interface: wordin/wordlen/valid_in are taken every clock. 65 clocks later
// (1 padding + 64 rounds) valid_out, wordout, wordlen_out, hashout and
// solved describe that string. solved = valid_out and hashout == hash. The
// valid flag keeps the strings of a filling or draining pipeline from being
// reported. hash is the 128-bit target, first digest byte in bits 127:120;
// it must be stable while strings are in flight.
// The padding unit, the 64 stages and the valid flag follow the design
// description; the valid_out and wordlen_out ports and the combinational
// digest/compare after stage 63 are this design's choices.
module md5r_solver_worker
  import md5_pkg::*;
  import md5r_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic [127:0] hash,
  input  logic         valid_in,
  input  word64_t      wordin,
  input  wordlen_t     wordlen,
  output logic         valid_out,
  output word64_t      wordout,
  output wordlen_t     wordlen_out,
  output logic [127:0] hashout,
  output logic         solved
);

  localparam int unsigned STAGES = 64;

  // Signals between stages: index j is the input of stage j.
  logic     valid_p   [STAGES + 1];
  block_t   m_p       [STAGES + 1];
  word64_t  word_p    [STAGES + 1];
  wordlen_t wordlen_p [STAGES + 1];
  state_t   state_p   [STAGES + 1];

  md5r_pad u_pad (
    .clk, .rst,
    .valid_in    (valid_in),
    .wordin      (wordin),
    .wordlen     (wordlen),
    .valid_out   (valid_p[0]),
    .m           (m_p[0]),
    .word_out    (word_p[0]),
    .wordlen_out (wordlen_p[0])
  );

  assign state_p[0] = MD5_IV;

  for (genvar j = 0; j < STAGES; j++) begin : g_stage
    md5r_round_stage #(.ROUND(j)) u_stage (
      .clk, .rst,
      .valid_in    (valid_p[j]),
      .m_in        (m_p[j]),
      .word_in     (word_p[j]),
      .wordlen_in  (wordlen_p[j]),
      .state_in    (state_p[j]),
      .valid_out   (valid_p[j+1]),
      .m_out       (m_p[j+1]),
      .word_out    (word_p[j+1]),
      .wordlen_out (wordlen_p[j+1]),
      .state_out   (state_p[j+1])
    );
  end

  assign valid_out   = valid_p[STAGES];
  assign wordout     = word_p[STAGES];
  assign wordlen_out = wordlen_p[STAGES];
  assign hashout     = digest_of(state_p[STAGES]);
  assign solved      = valid_out && (hashout == hash);

endmodule
