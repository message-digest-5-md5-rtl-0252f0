// md5r_uart_tx: RS232 transmitter for bytes to the PC (8 data bits, least
// significant first, no parity, one stop bit).
//
// A one-clock pulse on send while idle loads data; the line then carries the
// start bit, the 8 data bits and the stop bit, each held for CLKS_PER_BIT
// clocks. complete pulses for one clock when the stop bit has ended, and busy
// is high from the clock after send until then. A send while busy is
// ignored. CLKS_PER_BIT = 1000 gives 100 kBd from a 100 MHz clock. The line
// idles high; rst is synchronous and active high.
// The bit time follows the design description; the 8N1 frame and the
// complete pulse timing are this design's choices.
module md5r_uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 1000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       send,
  input  logic [7:0] data,
  output logic       tx,
  output logic       busy,
  output logic       complete
);

  logic [$clog2(CLKS_PER_BIT + 1)-1:0] cnt;
  logic [3:0] bit_idx;   // 0 start, 1-8 data, 9 stop
  logic [9:0] frame;

  always_ff @(posedge clk) begin
    if (rst) begin
      tx       <= 1'b1;
      busy     <= 1'b0;
      complete <= 1'b0;
      cnt      <= '0;
      bit_idx  <= '0;
      frame    <= '1;
    end else begin
      complete <= 1'b0;
      if (!busy) begin
        if (send) begin
          busy    <= 1'b1;
          frame   <= {1'b1, data, 1'b0};
          tx      <= 1'b0;
          cnt     <= '0;
          bit_idx <= '0;
        end
      end else if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
        cnt <= '0;
        if (bit_idx == 4'd9) begin
          busy     <= 1'b0;
          complete <= 1'b1;
          tx       <= 1'b1;
        end else begin
          bit_idx <= bit_idx + 1'b1;
          tx      <= frame[bit_idx + 1'b1];
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  initial assert (CLKS_PER_BIT >= 2) else $fatal(1, "CLKS_PER_BIT must be at least 2");

endmodule
