// tb_md5_reversal_top: end-to-end test of the reversal device with three
// solver workers and a 20-clock bit period, driven over the serial line by
// the PC model. It reverses the hashes of "so" and ",)d" and checks every
// reply byte against values worked out here: status before and during the
// search (0x07), attempt counts while searching (0x03, growing, never past
// the answer) and after it (the answer's position in the search order),
// the solved reply (0x06, string, zero bytes), the hash echo, an ignored
// unknown code and a restart with a new hash. Each of these mechanisms is
// counted and must have happened at least once.
module tb_md5_reversal_top;
  import md5_ref_pkg::*;

  localparam int CPB = 20;
  localparam int W = 3;

  logic clk = 1'b0, rst = 1'b1;
  logic uart_rx, uart_tx, solved;
  int checks = 0, failures = 0;

  md5_reversal_top #(.NUM_WORKERS(W), .CLKS_PER_BIT(CPB)) dut (.*);
  md5r_pc_model #(.CPB(CPB)) pc (.clk, .to_dev (uart_rx), .from_dev (uart_tx));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // mechanism counters
  int n_not_solved = 0, n_solved = 0, n_count = 0, n_echo = 0, n_ignored = 0;
  int n_restart = 0, n_len_carry = 0, n_multi_worker = 0;

  function automatic logic [127:0] bytes_to_128(logic [7:0] q [$], int from);
    logic [127:0] v = '0;
    for (int i = 0; i < 16; i++) v = {v[119:0], q[from + i]};
    return v;
  endfunction

  task automatic request_count(output logic [127:0] cnt);
    logic [7:0] r [$];
    pc.send_byte(8'h02);
    pc.get_bytes(17, 40 * CPB * 10, r);
    check(r.size() == 17 && r[0] == 8'h03, "count reply code");
    cnt = (r.size() == 17) ? bytes_to_128(r, 1) : '1;
    n_count++;
  endtask

  // Status request; returns 1 and the string when solved.
  task automatic request_status(output bit done, output string s);
    logic [7:0] r [$];
    pc.send_byte(8'h08);
    pc.get_bytes(1, 4 * CPB * 10, r);
    done = 1'b0; s = "";
    if (r.size() == 1 && r[0] == 8'h07) begin
      n_not_solved++;
    end else if (r.size() == 1 && r[0] == 8'h06) begin
      logic [7:0] p [$];
      pc.get_bytes(16, 40 * CPB * 10, p);
      check(p.size() == 16, "16 bytes follow 0x06");
      for (int i = 0; i < p.size(); i++) if (p[i] != 0) s = {s, string'(p[i])};
      for (int i = s.len(); i < p.size(); i++) check(p[i] == 0, "zero bytes after the string");
      done = 1'b1;
      n_solved++;
    end else begin
      check(0, "status reply is 0x06 or 0x07");
    end
  endtask

  task automatic reverse(string target);
    bit done = 1'b0;
    string s;
    logic [127:0] c, c_prev = '0;
    longint unsigned n = rank(target);
    logic [7:0] r [$];
    if (solved) n_restart++;
    pc.send_hash(md5(target));
    request_status(done, s);
    check(!done, $sformatf("\"%s\" not solved right after the hash", target));
    for (int k = 0; k < 1000 && !done; k++) begin
      request_count(c);
      check(c <= 128'(n), "count never past the answer");
      if (!solved) begin
        check(c > c_prev, "count grows while searching");
      end
      c_prev = c;
      request_status(done, s);
    end
    check(done && s == target, $sformatf("solved \"%s\", want \"%s\"", s, target));
    request_count(c);
    check(c == 128'(n), $sformatf("attempts %0d, want %0d", c, n));
    if (target.len() > 1) n_len_carry++;
    if (((n - 1) % W) != 0) n_multi_worker++;
    // hash echo
    pc.send_byte(8'h0A);
    pc.get_bytes(16, 40 * CPB * 10, r);
    check(r.size() == 16 && bytes_to_128(r, 0) == md5(target), "hash echo");
    n_echo++;
  endtask

  initial begin
    logic [7:0] r [$];
    bit done;
    string s;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (10) @(negedge clk);
    request_status(done, s);
    check(!done, "not solved before any hash");
    reverse("so");
    pc.send_byte(8'h42);
    pc.get_bytes(1, 30 * CPB * 10, r);
    check(r.size() == 0, "unknown code ignored");
    n_ignored++;
    reverse(",)d");
    check(pc.framing_errors == 0, "no framing errors on the device's line");
    check(n_not_solved > 0, "mechanism: not-solved reply");
    check(n_solved > 0, "mechanism: solved reply");
    check(n_count > 0, "mechanism: attempt-count reply");
    check(n_echo > 0, "mechanism: hash echo");
    check(n_ignored > 0, "mechanism: unknown code");
    check(n_restart > 0, "mechanism: restart with a new hash");
    check(n_len_carry > 0, "mechanism: string length carry");
    check(n_multi_worker > 0, "mechanism: answer found by a worker other than 0");
    $display("mechanisms: not_solved=%0d solved=%0d count=%0d echo=%0d ignored=%0d restart=%0d len_carry=%0d multi_worker=%0d",
             n_not_solved, n_solved, n_count, n_echo, n_ignored, n_restart, n_len_carry, n_multi_worker);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
