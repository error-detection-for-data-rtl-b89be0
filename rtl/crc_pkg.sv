// crc_pkg: constants and types shared by the CRC link.
//
// Generator polynomials are stored without their leading term: bit i holds the
// coefficient g_i of X^i for i = 0 .. M-1, and g_M = 1 is implied. Over GF(2)
// the leading coefficient of a generator is always 1, so the 1/g_M multiplier
// of the general divider reduces to a plain connection.
//
//  - CRC8_EXAMPLE_POLY: X^8 + X^4 + X + 1, the 8-bit generator of the worked
//    example that this design takes as its main configuration (12 message bits,
//    8 check bits, all bursts up to 8 bits detected).
//  - CRC16_POLY: X^16 + X^15 + X^2 + 1, the CRC-16 standard for 8-bit data words.
//  - CRC3_EXAMPLE_POLY: X^3 + X + 1, the small generator of the introductory
//    division example.
//
// rsp_t is the answer the receiving station returns for every frame. ACK and
// NAK follow the usual retransmission-on-error exchange; ERR is the error
// signal sent once the retry limit is reached. The 2-bit encoding is a choice
// of this design.
package crc_pkg;

  localparam logic [2:0]  CRC3_EXAMPLE_POLY = 3'b011;
  localparam logic [7:0]  CRC8_EXAMPLE_POLY = 8'h13;
  localparam logic [15:0] CRC16_POLY        = 16'h8005;

  typedef enum logic [1:0] {
    RSP_ACK = 2'd0,
    RSP_NAK = 2'd1,
    RSP_ERR = 2'd2
  } rsp_t;

endpackage
