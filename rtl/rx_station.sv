// rx_station: receiving station of the retransmission-on-error link. It checks
// each received frame with a crc_checker and answers it: ACK when the
// remainder is zero, in which case the K message bits are handed to the user;
// NAK to request the same message again; ERR instead of NAK when the message
// has now failed MAX_TRIES times in a row, telling the transmitter that the
// operation cannot continue.
//
// How it works: frames have a fixed length N = K + M bits and the line carries
// only a bit and its valid strobe, so the station counts bits to find the
// frame end (the first bit restarts the divider, bit N-1 is marked last). The
// first K bits are also shifted into a message register. One cycle after the
// last bit the checker reports; on that cycle the station issues its answer
// and, on ACK, its message.
//
// Interface: line_valid/line_bit from the channel; rsp_valid/rsp_code to the
// reverse channel; msg_valid/msg_data to the user (one-cycle pulse);
// give_up pulses with ERR; remainder shows the last frame's remainder.
// Timing: answer one cycle after the last frame bit. rst_n is synchronous,
// active low.
//
// Source and choices: ACK, NAK and an error signal after a set number of
// failed transmissions follow the CRC thesis this design is based on, which
// leaves the number open; MAX_TRIES = 4, the fixed frame length and the
// timing are this design's own.
module rx_station
  import crc_pkg::*;
#(
  parameter int unsigned  K         = 12,
  parameter int unsigned  M         = 8,
  parameter logic [M-1:0] GPOLY     = crc_pkg::CRC8_EXAMPLE_POLY,
  parameter int unsigned  MAX_TRIES = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         line_valid,
  input  logic         line_bit,
  output logic         rsp_valid,
  output rsp_t         rsp_code,
  output logic         msg_valid,
  output logic [K-1:0] msg_data,
  output logic         give_up,
  output logic [M-1:0] remainder
);

  localparam int unsigned N  = K + M;
  localparam int unsigned NW = $clog2(N);
  localparam int unsigned TW = $clog2(MAX_TRIES + 1);

  logic [NW-1:0] bit_cnt;
  logic [TW-1:0] fails;      // consecutive failed receptions of this message
  logic [K-1:0]  shreg;
  logic          chk_last;
  logic          chk_done;
  logic          chk_error;

  always_comb chk_last = (bit_cnt == NW'(N - 1));

  crc_checker #(.M(M), .GPOLY(GPOLY)) u_chk (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (line_valid),
    .in_bit   (line_bit),
    .in_last  (chk_last),
    .done     (chk_done),
    .error    (chk_error),
    .remainder(remainder)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bit_cnt <= '0;
      shreg   <= '0;
    end else if (line_valid) begin
      bit_cnt <= chk_last ? '0 : bit_cnt + NW'(1);
      if (bit_cnt < NW'(K)) shreg <= {shreg[K-2:0], line_bit};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fails <= '0;
    end else if (chk_done) begin
      if (!chk_error)                          fails <= '0;
      else if (fails == TW'(MAX_TRIES - 1))    fails <= '0;
      else                                     fails <= fails + TW'(1);
    end
  end

  always_comb begin
    rsp_valid = chk_done;
    msg_valid = chk_done & !chk_error;
    msg_data  = shreg;
    give_up   = chk_done & chk_error & (fails == TW'(MAX_TRIES - 1));
    if (!chk_error)   rsp_code = RSP_ACK;
    else if (give_up) rsp_code = RSP_ERR;
    else              rsp_code = RSP_NAK;
  end

endmodule
