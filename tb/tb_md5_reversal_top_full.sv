// tb_md5_reversal_top_full: one complete reversal on the device with every
// parameter at its default (one solver worker, 1000 clocks per bit, i.e.
// 100 kBd at 100 MHz). The PC model sends the hash of "wax", polls the
// status and the attempt count until the device reports the string, then
// checks the string, the final count (the string's position in the search
// order, 800559) and the hash echo.
module tb_md5_reversal_top_full;
  import md5_ref_pkg::*;

  localparam int CPB = 1000;

  logic clk = 1'b0, rst = 1'b1;
  logic uart_rx, uart_tx, solved;
  int checks = 0, failures = 0;

  md5_reversal_top dut (.*);
  md5r_pc_model #(.CPB(CPB)) pc (.clk, .to_dev (uart_rx), .from_dev (uart_tx));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [127:0] bytes_to_128(logic [7:0] q [$], int from);
    logic [127:0] v = '0;
    for (int i = 0; i < 16; i++) v = {v[119:0], q[from + i]};
    return v;
  endfunction

  initial begin
    automatic string target = "wax";
    automatic longint unsigned n = rank(target);
    automatic logic [127:0] c_prev = '0;
    automatic int polls = 0, not_solved = 0;
    automatic bit done = 1'b0;
    automatic string s = "";
    logic [7:0] r [$];
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (10) @(negedge clk);
    pc.send_hash(md5(target));
    while (!done && polls < 50) begin
      polls++;
      pc.send_byte(8'h02);
      pc.get_bytes(17, 400000, r);
      check(r.size() == 17 && r[0] == 8'h03, "count reply");
      if (r.size() == 17) begin
        check(bytes_to_128(r, 1) <= 128'(n) && (solved || bytes_to_128(r, 1) > c_prev),
              "count grows, never past the answer");
        c_prev = bytes_to_128(r, 1);
        $display("attempts so far: %0d", c_prev);
      end
      pc.send_byte(8'h08);
      pc.get_bytes(1, 40000, r);
      if (r.size() == 1 && r[0] == 8'h07) not_solved++;
      else if (r.size() == 1 && r[0] == 8'h06) begin
        pc.get_bytes(16, 400000, r);
        for (int i = 0; i < r.size(); i++) if (r[i] != 0) s = {s, string'(r[i])};
        check(r.size() == 16, "16 bytes after 0x06");
        done = 1'b1;
      end else check(0, "status reply");
    end
    check(not_solved > 0, "not-solved reply seen while searching");
    check(done && s == target, $sformatf("found \"%s\", want \"%s\"", s, target));
    pc.send_byte(8'h02);
    pc.get_bytes(17, 400000, r);
    check(r.size() == 17 && bytes_to_128(r, 1) == 128'(n),
          $sformatf("final attempts %0d, want %0d", bytes_to_128(r, 1), n));
    pc.send_byte(8'h0A);
    pc.get_bytes(16, 400000, r);
    check(r.size() == 16 && bytes_to_128(r, 0) == md5(target), "hash echo");
    $display("reversed \"%s\" after %0d attempts, %0d status polls", s, n, polls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
