// md5_reversal_top: MD5 hash reversal device. A PC sends the 128-bit MD5
// hash of an unknown short string over an RS232 link; the device tries every
// printable ASCII string of 1 to 8 characters, shortest first, hashing
// NUM_WORKERS strings per clock in fully pipelined MD5 solver workers, until
// one hashes to the target, and reports that string.
//
// Blocks: md5r_uart_rx and md5r_uart_tx (serial link, CLKS_PER_BIT clocks
// per bit, 1000 for 100 kBd at 100 MHz), md5r_controller (command codes,
// hash register, replies) and md5r_solver_manager (string generation,
// attempt counter, result), which holds the md5r_solver_worker instances.
// The controller keeps the solver manager in reset until a hash has been
// received and restarts it for every new hash.
//
// MAX_LEN (default 8) is the longest string tried.
//
// Ports: clk, rst (synchronous, active high), uart_rx from the PC, uart_tx
// to the PC and solved, the solver manager's solved flag (for a status LED).
// The block structure and the defaults (one worker, 1000 clocks per bit)
// follow the design description; the solved port is this design's addition.
module md5_reversal_top #(
  parameter int unsigned NUM_WORKERS  = 1,
  parameter int unsigned CLKS_PER_BIT = 1000,
  parameter int unsigned MAX_LEN      = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic uart_rx,
  output logic uart_tx,
  output logic solved
);

  logic         rx_ready, rx_ack;
  logic [7:0]   rx_data;
  logic         tx_send, tx_busy, tx_complete;
  logic [7:0]   tx_data;
  logic         solver_rst;
  logic [127:0] hash;
  logic [127:0] attempts;
  logic [63:0]  result;

  md5r_uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst,
    .rx    (uart_rx),
    .ack   (rx_ack),
    .ready (rx_ready),
    .data  (rx_data)
  );

  md5r_uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst,
    .send     (tx_send),
    .data     (tx_data),
    .tx       (uart_tx),
    .busy     (tx_busy),
    .complete (tx_complete)
  );

  md5r_controller u_ctrl (
    .clk, .rst,
    .rx_ready, .rx_data, .rx_ack,
    .tx_send, .tx_data, .tx_complete,
    .solver_rst, .hash,
    .solvedflag (solved),
    .attempts, .result
  );

  md5r_solver_manager #(.NUM_WORKERS(NUM_WORKERS), .MAX_LEN(MAX_LEN)) u_mgr (
    .clk,
    .rst        (solver_rst),
    .hash,
    .solvedflag (solved),
    .attempts,
    .result
  );

  // The controller never hands the transmitter a byte while it is sending.
  a_tx_idle: assert property (@(posedge clk) disable iff (rst) tx_send |-> !tx_busy);

endmodule
