// md5r_pc_model: behavioural model of the PC end of the serial link for the
// device testbenches. It sends bytes as 8N1 frames of CPB clocks per bit on
// to_dev and decodes every frame the device sends on from_dev into the
// queue rxq (sampling each bit in its middle). Tasks: send_byte, send_hash,
// get_bytes (wait for n bytes, with a time limit).
module md5r_pc_model #(
  parameter int CPB = 1000
) (
  input  logic clk,
  output logic to_dev,
  input  logic from_dev
);

  logic [7:0] rxq [$];
  int framing_errors = 0;

  initial to_dev = 1'b1;

  task automatic send_byte(logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      @(negedge clk) to_dev = f[i];
      repeat (CPB - 1) @(negedge clk);
    end
    @(negedge clk) to_dev = 1'b1;
  endtask

  task automatic send_hash(logic [127:0] h);
    send_byte(8'h01);
    for (int i = 0; i < 16; i++) send_byte(h[127 - 8*i -: 8]);
  endtask

  // Wait until n bytes are queued or limit clocks pass; return them.
  task automatic get_bytes(int n, int limit, output logic [7:0] got [$]);
    int t = 0;
    while (rxq.size() < n && t < limit) begin @(negedge clk); t++; end
    got = '{};
    while (got.size() < n && rxq.size() > 0) got.push_back(rxq.pop_front());
  endtask

  // Receiver
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge from_dev);
      repeat (CPB / 2) @(posedge clk);
      if (from_dev == 1'b0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (CPB) @(posedge clk);
          b[i] = from_dev;
        end
        repeat (CPB) @(posedge clk);
        if (from_dev) rxq.push_back(b);
        else framing_errors++;
      end
    end
  end
endmodule
