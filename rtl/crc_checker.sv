// crc_checker: receiver-side CRC check. It divides the received code
// polynomial, check bits included, by the same g(X) the transmitter used. A
// code message received without error is an exact multiple of g(X) and leaves
// a zero remainder; any other remainder flags an error.
//
// How it works: the received bits, highest order first, are shifted straight
// into a poly_div (no prescaling at the receiver). The first bit of a frame
// restarts the divider, and the bit marked in_last ends the frame. On the
// next cycle done pulses, remainder shows the register contents and error is
// high if any of them is 1. remainder and error stay valid until the next
// frame begins, so frames may follow each other with no idle cycle.
//
// Interface: in_valid/in_bit/in_last, one bit per cycle, no back-pressure.
// Outputs done (one-cycle pulse), error, remainder[M-1:0] (bit i is the
// coefficient of X^i). Timing: done comes one cycle after the last bit.
// rst_n is synchronous, active low.
//
// Source and choices: dividing the whole received word with the encoder's
// circuit and testing the remainder for zero follow the CRC thesis this
// design is based on; the interface and timing are this design's own.
module crc_checker #(
  parameter int unsigned  M     = 8,
  parameter logic [M-1:0] GPOLY = crc_pkg::CRC8_EXAMPLE_POLY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_bit,
  input  logic         in_last,
  output logic         done,
  output logic         error,
  output logic [M-1:0] remainder
);

  logic first;
  logic div_quot;

  poly_div #(.M(M), .GPOLY(GPOLY)) u_div (
    .clk     (clk),
    .rst_n   (rst_n),
    .shift_en(in_valid),
    .start   (first),
    .in_bit  (in_bit),
    .quot    (div_quot),
    .rem     (remainder)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      first <= 1'b1;
      done  <= 1'b0;
    end else begin
      done <= in_valid & in_last;
      if (in_valid) first <= in_last;
    end
  end

  always_comb error = |remainder;

  // The quotient coefficients leave on the divider's output line and are not
  // needed for the check.
  logic unused_quot;
  assign unused_quot = div_quot;

endmodule
