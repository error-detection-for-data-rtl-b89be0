// crc_link: a complete CRC-protected serial data link with retransmission on
// error, and beside it the serial polynomial multiplier.
//
// The link follows the classic source -> encoder -> channel -> decoder -> user
// chain. The transmitting station (tx_station) takes a K-bit message, sends it
// highest-order bit first followed by its M-bit CRC, and waits for the answer.
// The receiving station (rx_station) divides each received frame by the same
// generator, answers ACK and delivers the message when the remainder is 0,
// answers NAK to get the message again, and answers ERR after MAX_TRIES failed
// receptions of one message, which stops the transmitter.
//
// The channel itself is not logic, so both of its directions are brought out:
// the forward line leaves on line_tx_* and comes back in on line_rx_*, the
// answers leave on rsp_tx_* and come back in on rsp_rx_*. Wiring tx to rx
// directly gives an error-free channel; a test bench can flip bits or delay
// the answers on the way.
//
// Defaults: K = 12 message bits, M = 8 check bits and g(X) = X^8 + X^4 + X + 1,
// the worked example of the design; MAX_TRIES = 4 is this design's choice.
// The multiplier (pm_*) is independent of the link; it multiplies its serial
// input by b(X) = X^3 + X + 1 by default.
//
// Timing: a frame occupies the transmitter for K + 2M cycles (message, M idle
// cycles while the divider is flushed with zeros, check bits); the receiver
// answers one cycle after the last frame bit reaches it. rst_n is synchronous
// and active low for the whole design.
//
// Source and choices: the source-encoder-channel-decoder-user structure, the
// 12/8-bit configuration and X^8 + X^4 + X + 1 follow the CRC thesis this
// design is based on; the port-level channel and MAX_TRIES are this design's
// own.
module crc_link
  import crc_pkg::*;
#(
  parameter int unsigned  K         = 12,
  parameter int unsigned  M         = 8,
  parameter logic [M-1:0] GPOLY     = crc_pkg::CRC8_EXAMPLE_POLY,
  parameter int unsigned  MAX_TRIES = 4,
  parameter int unsigned  PM_M      = 3,
  parameter logic [PM_M:0] PM_BPOLY = {1'b1, crc_pkg::CRC3_EXAMPLE_POLY}
) (
  input  logic         clk,
  input  logic         rst_n,
  // user side of the transmitting station
  input  logic         tx_msg_valid,
  output logic         tx_msg_ready,
  input  logic [K-1:0] tx_msg_data,
  output logic         tx_sent,
  output logic         tx_link_error,
  output logic [3:0]   tx_retries,
  // forward channel
  output logic         line_tx_valid,
  output logic         line_tx_bit,
  input  logic         line_rx_valid,
  input  logic         line_rx_bit,
  // reverse channel (answers)
  output logic         rsp_tx_valid,
  output rsp_t         rsp_tx_code,
  input  logic         rsp_rx_valid,
  input  rsp_t         rsp_rx_code,
  // user side of the receiving station
  output logic         rx_msg_valid,
  output logic [K-1:0] rx_msg_data,
  output logic         rx_give_up,
  output logic [M-1:0] rx_remainder,
  // polynomial multiplier
  input  logic         pm_shift_en,
  input  logic         pm_in_bit,
  output logic         pm_out_bit
);

  tx_station #(.K(K), .M(M), .GPOLY(GPOLY), .RW(4)) u_tx (
    .clk       (clk),
    .rst_n     (rst_n),
    .msg_valid (tx_msg_valid),
    .msg_ready (tx_msg_ready),
    .msg_data  (tx_msg_data),
    .line_valid(line_tx_valid),
    .line_bit  (line_tx_bit),
    .rsp_valid (rsp_rx_valid),
    .rsp_code  (rsp_rx_code),
    .sent      (tx_sent),
    .link_error(tx_link_error),
    .retries   (tx_retries)
  );

  rx_station #(.K(K), .M(M), .GPOLY(GPOLY), .MAX_TRIES(MAX_TRIES)) u_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .line_valid(line_rx_valid),
    .line_bit  (line_rx_bit),
    .rsp_valid (rsp_tx_valid),
    .rsp_code  (rsp_tx_code),
    .msg_valid (rx_msg_valid),
    .msg_data  (rx_msg_data),
    .give_up   (rx_give_up),
    .remainder (rx_remainder)
  );

  poly_mul #(.M(PM_M), .BPOLY(PM_BPOLY)) u_pmul (
    .clk     (clk),
    .rst_n   (rst_n),
    .shift_en(pm_shift_en),
    .in_bit  (pm_in_bit),
    .out_bit (pm_out_bit)
  );

endmodule
