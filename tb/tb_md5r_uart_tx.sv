// tb_md5r_uart_tx: sends bytes through the transmitter at its default bit
// period (1000 clocks) and decodes the line: start bit, 8 data bits least
// significant first, stop bit, each held exactly 1000 clocks; complete must
// pulse once, 10 bit periods after send, and a send while busy is ignored.
module tb_md5r_uart_tx;
  localparam int CPB = 1000;

  logic clk = 1'b0, rst = 1'b1, send = 1'b0;
  logic [7:0] data = '0;
  logic tx, busy, complete;
  int checks = 0, failures = 0;
  int cycle = 0;

  md5r_uart_tx dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    check(tx && !busy, "idle line high");
    for (int n = 0; n < 10; n++) begin
      automatic logic [7:0] b = (n == 0) ? 8'h03 : 8'($urandom);
      automatic logic [9:0] seen;
      automatic int n_complete = 0, t_complete = -1;
      data = b; send = 1'b1;
      @(negedge clk);
      send = 1'b0;
      data = ~b;
      // sample each bit: first and last clock of the bit must agree
      for (int i = 0; i < 10; i++) begin
        automatic logic first = tx;
        if (i == 3) begin send = 1'b1; @(negedge clk); send = 1'b0; end  // ignored
        else @(negedge clk);
        repeat (CPB - 2) @(negedge clk);
        check(tx == first, $sformatf("bit %0d held for the whole period", i));
        seen[i] = tx;
        @(negedge clk);
        if (complete) begin n_complete++; t_complete = i; end
      end
      check(seen == {1'b1, b, 1'b0}, $sformatf("frame %b want %b", seen, {1'b1, b, 1'b0}));
      check(n_complete == 1 && t_complete == 9, "complete once after the stop bit");
      check(!busy && tx, "idle after frame");
      repeat ($urandom_range(5)) @(negedge clk);
    end
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
