// md5r_uart_rx: RS232 receiver for bytes from the PC (8 data bits, least
// significant first, no parity, one stop bit).
//
// The line is synchronised with two flip-flops. In IDLE the receiver waits
// for the line to go low (start bit), checks half a bit period later that it
// is still low, then samples the line once every CLKS_PER_BIT clocks, in the
// middle of each of the 8 data bits, into a shift register. After the middle
// of the stop bit the byte is placed in data and ready is raised. ready stays
// high until the controller pulses ack; a byte arriving before that replaces
// the held one. A low stop bit drops the byte.
//
// CLKS_PER_BIT = 1000 gives 100 kBd from a 100 MHz clock (10 us per bit).
// rst is synchronous and active high.
// Waiting for the falling line and sampling once per bit period follow the
// design description; mid-bit sampling, the 8N1 frame and the ready/ack
// handshake are this design's choices.
module md5r_uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 1000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  input  logic       ack,
  output logic       ready,
  output logic [7:0] data
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;

  state_e      state;
  logic [1:0]  sync;
  logic [$clog2(CLKS_PER_BIT + 1)-1:0] cnt;
  logic [2:0]  bit_idx;
  logic [7:0]  shreg;
  logic        line;

  assign line = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync    <= 2'b11;
      state   <= IDLE;
      cnt     <= '0;
      bit_idx <= '0;
      ready   <= 1'b0;
      data    <= '0;
      shreg   <= '0;
    end else begin
      sync <= {sync[0], rx};
      if (ack) ready <= 1'b0;
      case (state)
        IDLE: begin
          cnt <= '0;
          if (!line) state <= START;
        end
        START: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT / 2 - 1)) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= line ? IDLE : DATA;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        DATA: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {line, shreg[7:1]};
            if (bit_idx == 3'd7) state <= STOP;
            bit_idx <= bit_idx + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        STOP: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= IDLE;
            if (line) begin
              data  <= shreg;
              ready <= 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  initial assert (CLKS_PER_BIT >= 4) else $fatal(1, "CLKS_PER_BIT must be at least 4");

endmodule
