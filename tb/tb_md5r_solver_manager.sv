// tb_md5r_solver_manager: runs complete brute-force searches with one and
// with three solver workers. For each target string it checks the result,
// that attempts equals the string's 1-based position in the search order
// (shortest first, 95 printable characters, last character fastest), the
// clock in which solvedflag rises (string at position n issued (n-1)/N
// clocks after reset ends, plus 65 clocks of pipeline and one of result
// register) and that the flag and count then stay frozen. With three
// workers the targets hit the first, middle and last worker.
module tb_md5r_solver_manager;
  import md5r_pkg::*;
  import md5_ref_pkg::*;

  logic clk = 1'b0;
  logic rst1 = 1'b1, rst3 = 1'b1;
  logic [127:0] hash1, hash3;
  logic solved1, solved3;
  logic [127:0] att1, att3;
  word64_t res1, res3;
  int checks = 0, failures = 0;
  int cycle = 0;

  md5r_solver_manager #(.NUM_WORKERS(1)) dut1 (
    .clk, .rst (rst1), .hash (hash1), .solvedflag (solved1), .attempts (att1), .result (res1));
  md5r_solver_manager #(.NUM_WORKERS(3)) dut3 (
    .clk, .rst (rst3), .hash (hash3), .solvedflag (solved3), .attempts (att3), .result (res3));

  // Two workers, strings of at most two characters: 95 + 95^2 = 9120 strings.
  logic rst2 = 1'b1, solved2;
  logic [127:0] hash2, att2;
  word64_t res2;
  md5r_solver_manager #(.NUM_WORKERS(2), .MAX_LEN(2)) dut2 (
    .clk, .rst (rst2), .hash (hash2), .solvedflag (solved2), .attempts (att2), .result (res2));

  // End of the search space: the last string is found; a string outside the
  // space is not, and the count stops at the size of the space.
  task automatic search_end(string target, bit found);
    longint unsigned last = 95 + 95 * 95;
    hash2 = md5(target); rst2 = 1'b1;
    @(posedge clk); @(negedge clk);
    rst2 = 1'b0;
    repeat (last / 2 + 200) @(negedge clk);
    check(solved2 == found, $sformatf("\"%s\" in a 2-character space: solved %b", target, solved2));
    check(att2 == 128'(found ? rank(target) : last), $sformatf("count %0d at end of space", att2));
    if (found) check(unpack(res2) == target, "last string found");
    repeat (100) @(negedge clk);
    check(att2 == 128'(found ? rank(target) : last), "count stops at end of space");
  endtask

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // One search on the one-worker (w = 1) or three-worker (w = 3) manager.
  task automatic search(int w, string target);
    longint unsigned n = rank(target);
    int t0, t_expect;
    if (w == 1) begin hash1 = md5(target); rst1 = 1'b1; end
    else        begin hash3 = md5(target); rst3 = 1'b1; end
    @(posedge clk); @(negedge clk);
    if (w == 1) rst1 = 1'b0; else rst3 = 1'b0;
    t0 = cycle;             // first edge with reset low comes next
    t_expect = t0 + int'((n - 1) / longint'(w)) + 65;
    while (!((w == 1) ? solved1 : solved3)) begin
      @(negedge clk);
      if (cycle > t_expect + 10) break;
    end
    check(cycle == t_expect + 1, $sformatf("w=%0d \"%s\": solved after edge %0d, want %0d",
                                           w, target, cycle - 1, t_expect));
    check(unpack((w == 1) ? res1 : res3) == target,
          $sformatf("w=%0d result \"%s\" want \"%s\"", w, unpack((w == 1) ? res1 : res3), target));
    check(((w == 1) ? att1 : att3) == 128'(n),
          $sformatf("w=%0d \"%s\" attempts %0d want %0d", w, target, (w == 1) ? att1 : att3, n));
    repeat (80) @(negedge clk);
    check(((w == 1) ? (solved1 && att1 == 128'(n)) : (solved3 && att3 == 128'(n))),
          "flag and count frozen after solve");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(!solved1 && att1 == 0, "reset state");
    search(1, "a");
    search(1, "~");          // last one-character string
    search(1, "  ");         // first two-character string: length carry
    search(1, "so");
    search(3, "so");         // position 8060: worker 1 of 3
    search(3, ",)d");        // position 118344: worker 2 of 3
    search(3, "!~");         // position 285
    search(3, "\"a");        // position 351
    search(3, "b");          // position 67: worker 0
    search(3, "c");          // position 68: worker 1
    search(3, "d");          // position 69: worker 2
    search_end("~~", 1'b1);  // last string of the space, position 9120
    search_end("abc", 1'b0); // outside the space
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
