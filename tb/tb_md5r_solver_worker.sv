// tb_md5r_solver_worker: streams random strings of 1-8 characters, one per
// clock with random gaps, through a solver worker and checks each digest
// against the reference MD5, the 65-clock latency, the valid flag during
// pipeline fill and that solved rises exactly for the strings whose hash is
// the target.
module tb_md5r_solver_worker;
  import md5_pkg::*;
  import md5r_pkg::*;
  import md5_ref_pkg::*;

  localparam int LATENCY = 65;

  logic clk = 1'b0, rst = 1'b1;
  logic [127:0] hash;
  logic valid_in = 1'b0;
  word64_t wordin = '0;
  wordlen_t wordlen = '0;
  logic valid_out, solved;
  word64_t wordout;
  wordlen_t wordlen_out;
  logic [127:0] hashout;
  int checks = 0, failures = 0;
  int cycle = 0;

  md5r_solver_worker dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  typedef struct { string s; int t; } item_t;
  item_t exp_q [$];
  string target = "vader";
  int n_solved = 0, n_invalid_fill = 0;

  // Driver
  initial begin
    hash = md5(target);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 600; n++) begin
      automatic string s = (n % 97 == 50) ? target : rand_string(8);
      automatic bit v = ($urandom_range(9) != 0);
      @(negedge clk);
      valid_in = v;
      wordin   = pack(s);
      wordlen  = wordlen_t'(s.len() - 1);
      if (v) exp_q.push_back('{s, cycle + LATENCY});
    end
    @(negedge clk) valid_in = 1'b0;
    repeat (LATENCY + 5) @(posedge clk);
    check(exp_q.size() == 0, "all strings came out");
    check(n_solved == 6, $sformatf("target found 6 times, got %0d", n_solved));
    check(n_invalid_fill > 0, "invalid outputs while pipeline filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor
  always @(negedge clk) if (!rst) begin
    if (valid_out) begin
      item_t e;
      if (exp_q.size() == 0) begin
        check(0, "unexpected valid output");
      end else begin
        e = exp_q.pop_front();
        check(cycle == e.t, $sformatf("latency of \"%s\" (at %0d, want %0d)", e.s, cycle, e.t));
        check(wordout == pack(e.s) && int'(wordlen_out) == e.s.len() - 1, "string out");
        check(hashout == md5(e.s), $sformatf("digest of \"%s\": %h", e.s, hashout));
        check(solved == (e.s == target), "solved flag");
        if (solved) n_solved++;
      end
    end else begin
      check(!solved, "solved without valid");
      if (cycle < LATENCY + 3) n_invalid_fill++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
