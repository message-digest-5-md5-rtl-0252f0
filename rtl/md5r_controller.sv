// md5r_controller: communication hub between the serial link and the solver
// manager. It interprets the 8-bit command codes from the PC, holds the
// target hash and answers with status, attempt counts and the result.
//
// Commands (code_e in md5r_pkg):
//   0x01 incoming hash  - the next 16 bytes are the hash, first digest byte
//                         first. The solver manager is held in reset while
//                         they arrive and released after the 16th, which
//                         starts a new search from " ".
//   0x02 request count  - answered with 0x03 and 16 bytes: the 128-bit number
//                         of strings tried, most significant byte first,
//                         captured when the command is taken.
//   0x08 request status - answered with 0x06 and 16 bytes when solved: the
//                         found string in order, then zero bytes; otherwise
//                         with the single byte 0x07.
//   0x0A request hash   - answered with the 16 stored hash bytes, in the
//                         order they were received.
// Other codes are ignored. Until the first hash arrives the solver manager
// is held in reset.
//
// Interface: rx_ready/rx_data come from the UART receiver; rx_ack is a
// combinational acknowledge in the clock the byte is taken, which lets the
// receiver drop ready at the next edge. Bytes are sent by pulsing tx_send
// with tx_data and waiting for the transmitter's tx_complete pulse before
// the next byte. rst is synchronous and active high.
// The codes follow the design description; the byte orders, the form of the
// 0x06 and 0x0A payloads, ignoring unknown codes and holding the solver in
// reset until a hash arrives are this design's choices.
module md5r_controller
  import md5r_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  // UART receiver
  input  logic         rx_ready,
  input  logic [7:0]   rx_data,
  output logic         rx_ack,
  // UART transmitter
  output logic         tx_send,
  output logic [7:0]   tx_data,
  input  logic         tx_complete,
  // solver manager
  output logic         solver_rst,
  output logic [127:0] hash,
  input  logic         solvedflag,
  input  logic [127:0] attempts,
  input  word64_t      result
);

  typedef enum logic [2:0] {S_IDLE, S_HASH, S_SEND, S_WAIT} state_e;

  state_e       state;
  logic [3:0]   hash_cnt;     // hash bytes received so far
  logic         code_pending; // a reply code goes ahead of the payload
  logic [7:0]   code_byte;
  logic [127:0] payload;      // sent most significant byte first
  logic [4:0]   payload_left; // payload bytes still to send

  // Found string in order, then zero bytes.
  logic [127:0] result_bytes;
  always_comb begin
    result_bytes = '0;
    for (int k = 0; k < 8; k++) result_bytes[127 - 8*k -: 8] = result[8*k +: 8];
  end

  assign rx_ack = rx_ready && ((state == S_IDLE) || (state == S_HASH));

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      hash_cnt     <= '0;
      code_pending <= 1'b0;
      code_byte    <= '0;
      payload      <= '0;
      payload_left <= '0;
      hash         <= '0;
      solver_rst   <= 1'b1;
      tx_send      <= 1'b0;
      tx_data      <= '0;
    end else begin
      tx_send <= 1'b0;
      case (state)
        S_IDLE: if (rx_ready) begin
          case (rx_data)
            CMD_HASH_IN: begin
              solver_rst <= 1'b1;
              hash_cnt   <= '0;
              state      <= S_HASH;
            end
            CMD_REQ_COUNT: begin
              code_pending <= 1'b1;
              code_byte    <= RSP_COUNT;
              payload      <= attempts;
              payload_left <= 5'd16;
              state        <= S_SEND;
            end
            CMD_REQ_STATUS: begin
              code_pending <= 1'b1;
              code_byte    <= solvedflag ? RSP_SOLVED : RSP_NOT_SOLVED;
              payload      <= result_bytes;
              payload_left <= solvedflag ? 5'd16 : 5'd0;
              state        <= S_SEND;
            end
            CMD_REQ_HASH: begin
              code_pending <= 1'b0;
              payload      <= hash;
              payload_left <= 5'd16;
              state        <= S_SEND;
            end
            default: ;
          endcase
        end
        S_HASH: if (rx_ready) begin
          hash     <= {hash[119:0], rx_data};
          hash_cnt <= hash_cnt + 1'b1;
          if (hash_cnt == 4'd15) begin
            solver_rst <= 1'b0;
            state      <= S_IDLE;
          end
        end
        S_SEND: begin
          if (code_pending) begin
            tx_data      <= code_byte;
            tx_send      <= 1'b1;
            code_pending <= 1'b0;
            state        <= S_WAIT;
          end else if (payload_left != 0) begin
            tx_data      <= payload[127:120];
            tx_send      <= 1'b1;
            payload      <= {payload[119:0], 8'h00};
            payload_left <= payload_left - 1'b1;
            state        <= S_WAIT;
          end else begin
            state <= S_IDLE;
          end
        end
        S_WAIT: if (tx_complete) state <= S_SEND;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The receiver is only acknowledged for a byte it holds.
  a_ack_ready: assert property (@(posedge clk) disable iff (rst) rx_ack |-> rx_ready);
  // A new byte is only handed over once the previous one has gone out.
  a_send_wait: assert property (@(posedge clk) disable iff (rst) tx_send |=> state == S_WAIT);

endmodule
