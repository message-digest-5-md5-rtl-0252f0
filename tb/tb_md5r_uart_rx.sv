// tb_md5r_uart_rx: drives 8N1 frames at the receiver's default bit period
// (1000 clocks) and checks the received bytes, that ready rises once the
// stop bit has been sampled and stays until ack, that a frame sent 2% fast
// or slow is still received, that a short low glitch is not taken for a
// start bit and that a frame with a low stop bit is dropped.
module tb_md5r_uart_rx;
  localparam int CPB = 1000;

  logic clk = 1'b0, rst = 1'b1, rx = 1'b1, ack = 1'b0;
  logic ready;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int cycle = 0;

  md5r_uart_rx dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  task automatic send_frame(logic [7:0] b, int period, logic stop_bit);
    logic [9:0] f = {stop_bit, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = f[i];
      repeat (period) @(negedge clk);
    end
    rx = 1'b1;
  endtask

  task automatic take(logic [7:0] want, string what);
    int t = 0;
    while (!ready && t < 3 * CPB) begin @(negedge clk); t++; end
    check(ready && data == want, $sformatf("%s: got %h ready %b, want %h", what, data, ready, want));
    repeat (5) @(negedge clk);
    check(ready, "ready held until ack");
    ack = 1'b1; @(negedge clk); ack = 1'b0;
    check(!ready, "ready cleared by ack");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (20) @(negedge clk);
    for (int n = 0; n < 12; n++) begin
      automatic logic [7:0] b = (n == 0) ? 8'h01 : (n == 1) ? 8'hFF : (n == 2) ? 8'h00 : 8'($urandom);
      fork
        send_frame(b, CPB, 1'b1);
      join_none
      // ready must not rise before the middle of the stop bit
      repeat (9 * CPB + CPB / 2 - 10) begin
        @(negedge clk);
        if (ready) break;
      end
      check(!ready, "ready not before stop bit");
      take(b, "byte at nominal rate");
      wait fork;
      repeat (50) @(negedge clk);
    end
    // +/-2% rate error
    send_frame(8'hA5, CPB * 102 / 100, 1'b1);
    take(8'hA5, "2% slow");
    send_frame(8'h3C, CPB * 98 / 100, 1'b1);
    take(8'h3C, "2% fast");
    // glitch shorter than half a bit
    rx = 1'b0; repeat (CPB / 4) @(negedge clk); rx = 1'b1;
    repeat (12 * CPB) @(negedge clk);
    check(!ready, "glitch ignored");
    // low stop bit
    send_frame(8'h55, CPB, 1'b0);
    repeat (3 * CPB) @(negedge clk);
    check(!ready, "framing error dropped");
    // receiver still works afterwards
    send_frame(8'h81, CPB, 1'b1);
    take(8'h81, "after errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
