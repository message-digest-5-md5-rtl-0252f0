// tb_md5_table2_workloads: reverses the sample words "so", "axe", "wax" and
// "test" on the device at its default parameters (one solver worker, 1000
// clocks per bit) over the serial line. For each it checks the string, the
// final attempt count (the word's position in the search order) and the
// search time: from the end of the hash's last byte to the solved flag the
// device must take position + 65 pipeline clocks, less the half stop bit
// by which the receiver finishes early, to within one bit period - one
// string per clock per worker, run time = T * n / N + overhead.
module tb_md5_table2_workloads;
  import md5_ref_pkg::*;

  localparam int CPB = 1000;

  logic clk = 1'b0, rst = 1'b1;
  logic uart_rx, uart_tx, solved;
  int checks = 0, failures = 0;
  longint cycle = 0;

  md5_reversal_top dut (.*);
  md5r_pc_model #(.CPB(CPB)) pc (.clk, .to_dev (uart_rx), .from_dev (uart_tx));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  task automatic reverse(string target);
    longint unsigned n = rank(target);
    longint t_hash, t_solved, delta;
    logic [7:0] r [$];
    logic [127:0] cnt;
    string s = "";
    pc.send_hash(md5(target));
    t_hash = cycle;
    while (!solved && cycle < t_hash + longint'(n) + 10 * CPB) @(negedge clk);
    t_solved = cycle;
    delta = t_solved - t_hash;
    check(solved, $sformatf("\"%s\" solved", target));
    check(delta >= longint'(n) + 65 - CPB && delta <= longint'(n) + 65 + CPB,
          $sformatf("\"%s\": %0d clocks from hash to solved, want %0d +/- %0d", target, delta, n + 65, CPB));
    pc.send_byte(8'h08);
    pc.get_bytes(17, 40 * CPB * 10, r);
    check(r.size() == 17 && r[0] == 8'h06, "solved reply");
    for (int i = 1; i < r.size(); i++) if (r[i] != 0) s = {s, string'(r[i])};
    check(s == target, $sformatf("found \"%s\", want \"%s\"", s, target));
    pc.send_byte(8'h02);
    pc.get_bytes(17, 40 * CPB * 10, r);
    cnt = '0;
    for (int i = 1; i < r.size(); i++) cnt = {cnt[119:0], r[i]};
    check(r.size() == 17 && cnt == 128'(n), $sformatf("\"%s\": attempts %0d, want %0d", target, cnt, n));
    $display("%-6s position %0d, %0d clocks from hash to solved (%.6f s at 100 MHz)",
             target, n, delta, real'(delta) * 1.0e-8);
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (10) @(negedge clk);
    reverse("so");
    reverse("axe");
    reverse("wax");
    reverse("test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
