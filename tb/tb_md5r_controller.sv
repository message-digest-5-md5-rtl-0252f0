// tb_md5r_controller: plays the UART receiver, the UART transmitter and the
// solver manager around the controller and checks every command code:
// hash reception (solver held in reset while bytes arrive, released after
// the 16th), attempt-count reply (0x03 + 16 bytes, most significant first),
// status replies (0x07 alone, or 0x06 + the string + zero bytes), hash
// echo, and that an unknown code is ignored. Each reply byte must wait for
// the previous byte's complete pulse.
module tb_md5r_controller;
  import md5r_pkg::*;
  import md5_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic rx_ready = 1'b0, rx_ack;
  logic [7:0] rx_data = '0;
  logic tx_send, tx_complete = 1'b0;
  logic [7:0] tx_data;
  logic solver_rst;
  logic [127:0] hash;
  logic solvedflag = 1'b0;
  logic [127:0] attempts = '0;
  word64_t result = '0;
  int checks = 0, failures = 0;
  int cycle = 0;

  md5r_controller dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // Receiver model: present a byte until acknowledged.
  task automatic rx_byte(logic [7:0] b);
    @(negedge clk);
    rx_data = b; rx_ready = 1'b1;
    do @(posedge clk); while (!rx_ack);
    @(negedge clk);
    rx_ready = 1'b0;
    repeat ($urandom_range(3, 20)) @(negedge clk);
  endtask

  // Transmitter model: record bytes, complete after a random time.
  logic [7:0] txq [$];
  logic in_flight = 1'b0;
  int early_sends = 0;
  always @(posedge clk) begin
    if (tx_send) begin
      if (in_flight) early_sends++;
      txq.push_back(tx_data);
      in_flight <= 1'b1;
      fork begin
        repeat ($urandom_range(2, 30)) @(posedge clk);
        tx_complete <= 1'b1;
        @(posedge clk);
        tx_complete <= 1'b0;
        in_flight <= 1'b0;
      end join_none
    end
  end

  task automatic expect_reply(logic [7:0] want [$], string what);
    int t = 0;
    while (txq.size() < want.size() && t < 5000) begin @(negedge clk); t++; end
    repeat (100) @(negedge clk);
    check(txq == want, $sformatf("%s: got %p want %p", what, txq, want));
    txq.delete();
  endtask

  task automatic send_hash(logic [127:0] h);
    rx_byte(8'h01);
    for (int i = 0; i < 16; i++) begin
      check(solver_rst, "solver held in reset while hash arrives");
      rx_byte(h[127 - 8*i -: 8]);
    end
    check(!solver_rst && hash == h, "hash stored, solver released");
  endtask

  initial begin
    logic [7:0] want [$];
    automatic logic [127:0] h1 = md5("so"), h2 = md5("Newton");
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    check(solver_rst, "solver in reset before any hash");
    // status before a hash: not solved
    rx_byte(8'h08);
    expect_reply('{8'h07}, "status before hash");
    send_hash(h1);
    // count request
    attempts = 128'h0102030405060708090a0b0c0d0e0f10;
    rx_byte(8'h02);
    @(negedge clk) attempts = '0;   // reply holds the value taken with the command
    want = '{8'h03};
    for (int i = 1; i <= 16; i++) want.push_back(8'(i));
    expect_reply(want, "attempt count");
    // not solved
    rx_byte(8'h08);
    expect_reply('{8'h07}, "not solved");
    // unknown code
    rx_byte(8'h55);
    expect_reply('{}, "unknown code ignored");
    // solved
    solvedflag = 1'b1; result = pack("so");
    rx_byte(8'h08);
    want = '{8'h06, "s", "o"};
    for (int i = 0; i < 14; i++) want.push_back(8'h00);
    expect_reply(want, "solved with string");
    // hash echo
    rx_byte(8'h0A);
    want = '{};
    for (int i = 0; i < 16; i++) want.push_back(h1[127 - 8*i -: 8]);
    expect_reply(want, "hash echo");
    // second hash restarts the solver
    send_hash(h2);
    solvedflag = 1'b0;
    rx_byte(8'h0A);
    want = '{};
    for (int i = 0; i < 16; i++) want.push_back(h2[127 - 8*i -: 8]);
    expect_reply(want, "second hash echo");
    // full eight-character result
    solvedflag = 1'b1; result = pack("~~~~~~~~");
    rx_byte(8'h08);
    want = '{8'h06};
    for (int i = 0; i < 8; i++) want.push_back("~");
    for (int i = 0; i < 8; i++) want.push_back(8'h00);
    expect_reply(want, "eight-character result");
    check(early_sends == 0, "no byte handed over before complete");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
