// md5r_solver_manager: runs the brute-force search over NUM_WORKERS solver
// workers.
//
// The manager holds the current candidate string. Every clock it hands
// NUM_WORKERS consecutive strings to the workers (worker i gets the i-th
// string after the current one, through a chain of incrementers) and
// advances the current string by NUM_WORKERS. Strings run from " " (one
// space) through all printable ASCII strings (codes 32-126), shortest first
// and last character fastest, up to MAX_LEN (8) times '~'; there the search
// stops.
//
// Each clock it counts the strings whose hash came out of the workers. When
// a worker reports solved, the lowest such worker holds the earliest string
// in search order: the manager latches that string as result, adds only the
// strings up to it to attempts (so attempts is the 1-based position of the
// result in search order), raises solvedflag and stops issuing strings.
//
// Interface: rst (synchronous, active high) restarts the search from " "
// with attempts = 0; the search runs whenever rst is low. hash must be
// stable while the search runs. result holds the string with its unused
// high bytes zero, so its length is the number of non-zero bytes. Timing: a
// string issued in clock t is compared in clock t + 65; a string at
// position n is found about n / NUM_WORKERS + 66 clocks after reset ends.
// The alphabet, the 8-character limit, shortest-first order, the 128-bit
// count and the 64-bit result follow the design description; the order
// within one length, the split among workers and stopping after a match or
// after the last string are this design's choices.
module md5r_solver_manager
  import md5r_pkg::*;
#(
  parameter int unsigned NUM_WORKERS = 1,
  parameter int unsigned MAX_LEN     = MAX_CHARS
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [127:0] hash,
  output logic         solvedflag,
  output logic [127:0] attempts,
  output word64_t      result
);

  cand_t    cur;
  cand_t    cand      [NUM_WORKERS + 1];
  logic     running;

  logic     w_valid   [NUM_WORKERS];
  word64_t  w_word    [NUM_WORKERS];
  logic     w_solved  [NUM_WORKERS];

  assign running = cur.ok && !solvedflag;

  // Incrementer chain: cand[i] goes to worker i, cand[NUM_WORKERS] is the
  // next value of cur.
  always_comb begin
    cand[0] = cur;
    for (int i = 1; i <= NUM_WORKERS; i++) cand[i] = next_string(cand[i-1], MAX_LEN);
  end

  for (genvar i = 0; i < NUM_WORKERS; i++) begin : g_worker
    wordlen_t     unused_len;
    logic [127:0] unused_hash;
    md5r_solver_worker u_worker (
      .clk, .rst,
      .hash        (hash),
      .valid_in    (running && cand[i].ok),
      .wordin      (cand[i].chars),
      .wordlen     (cand[i].len),
      .valid_out   (w_valid[i]),
      .wordout     (w_word[i]),
      .wordlen_out (unused_len),
      .hashout     (unused_hash),
      .solved      (w_solved[i])
    );
  end

  // Strings finished this clock, and the lowest worker that matched.
  logic        hit;
  int unsigned hit_idx;
  logic [127:0] done_count;

  always_comb begin
    hit        = 1'b0;
    hit_idx    = 0;
    done_count = '0;
    for (int i = NUM_WORKERS - 1; i >= 0; i--) begin
      if (w_solved[i]) begin
        hit     = 1'b1;
        hit_idx = i;
      end
    end
    for (int i = 0; i < NUM_WORKERS; i++) begin
      if (w_valid[i] && (!hit || i <= int'(hit_idx))) done_count = done_count + 128'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cur        <= FIRST_STRING;
      solvedflag <= 1'b0;
      attempts   <= '0;
      result     <= '0;
    end else begin
      if (running) cur <= cand[NUM_WORKERS];
      if (!solvedflag) begin
        attempts <= attempts + done_count;
        if (hit) begin
          solvedflag <= 1'b1;
          result     <= w_word[hit_idx];
        end
      end
    end
  end

  initial assert (NUM_WORKERS >= 1) else $fatal(1, "NUM_WORKERS must be at least 1");
  initial assert (MAX_LEN >= 1 && MAX_LEN <= MAX_CHARS) else $fatal(1, "MAX_LEN must be 1..8");

endmodule
