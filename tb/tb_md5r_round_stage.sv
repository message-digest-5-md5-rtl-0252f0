// tb_md5r_round_stage: checks single MD5 round stages (one round from each
// of the four function groups, plus the first and last round) against a
// textbook computation of that round on random states and message blocks,
// with a one-clock latency and the valid flag cleared by reset.
module tb_md5r_round_stage;
  import md5_pkg::*;
  import md5r_pkg::*;

  localparam int NR = 6;
  localparam int ROUNDS [NR] = '{0, 13, 22, 37, 54, 63};

  logic clk = 1'b0, rst = 1'b1, valid_in = 1'b0;
  block_t m_in;
  word64_t word_in;
  wordlen_t wordlen_in;
  state_t state_in;
  logic     valid_out   [NR];
  block_t   m_out       [NR];
  word64_t  word_out    [NR];
  wordlen_t wordlen_out [NR];
  state_t   state_out   [NR];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar r = 0; r < NR; r++) begin : g_dut
    md5r_round_stage #(.ROUND(ROUNDS[r])) dut (
      .clk, .rst, .valid_in, .m_in, .word_in, .wordlen_in, .state_in,
      .valid_out (valid_out[r]), .m_out (m_out[r]), .word_out (word_out[r]),
      .wordlen_out (wordlen_out[r]), .state_out (state_out[r]));
  end

  // One round written out from the MD5 definition, constants from sin().
  function automatic state_t ref_round(int i, state_t s, block_t m);
    int sh [4][4] = '{'{7, 12, 17, 22}, '{5, 9, 14, 20}, '{4, 11, 16, 23}, '{6, 10, 15, 21}};
    logic [31:0] f, k, x, sum;
    int g;
    real v = $sin(real'(i + 1));
    if (v < 0) v = -v;
    k = 32'(longint'($floor(v * 4294967296.0)));
    case (i / 16)
      0: begin f = (s.b & s.c) | (~s.b & s.d); g = i; end
      1: begin f = (s.d & s.b) | (~s.d & s.c); g = (5*i + 1) % 16; end
      2: begin f = s.b ^ s.c ^ s.d;            g = (3*i + 5) % 16; end
      default: begin f = s.c ^ (s.b | ~s.d);   g = (7*i) % 16; end
    endcase
    x = s.a + f + k + m[g];
    sum = (x << sh[i/16][i%4]) | (x >> (32 - sh[i/16][i%4]));
    return '{a: s.d, b: s.b + sum, c: s.b, d: s.c};
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    for (int r = 0; r < NR; r++) check(!valid_out[r], "valid low in reset");
    rst <= 1'b0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      for (int j = 0; j < 16; j++) m_in[j] = $urandom;
      state_in   = {$urandom, $urandom, $urandom, $urandom};
      word_in    = {$urandom, $urandom};
      wordlen_in = wordlen_t'($urandom);
      valid_in   = $urandom_range(1);
      @(posedge clk); #1;
      for (int r = 0; r < NR; r++) begin
        check(state_out[r] == ref_round(ROUNDS[r], state_in, m_in),
              $sformatf("round %0d state", ROUNDS[r]));
        check(valid_out[r] == valid_in && m_out[r] == m_in && word_out[r] == word_in
              && wordlen_out[r] == wordlen_in, $sformatf("round %0d passthrough", ROUNDS[r]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
