// poly_mul: serial multiplier of an input polynomial a(X) by a fixed
// polynomial b(X) of degree M.
//
// How it works: the input line feeds, through the constant multipliers b_0 ..
// b_M, the adder in front of every stage and the adder on the output. Stage 0
// takes a_j*b_0, stage i takes (stage i-1) + a_j*b_i, and the output is
// (stage M-1) + a_j*b_M. Coefficients enter highest order first; the output
// presents the product coefficients highest order first, the first one
// combinationally in the same cycle as a_n. With all registers starting at 0,
// feeding a_n .. a_0 followed by M zeros yields all n+M+1 product
// coefficients, after which the registers are back at 0.
//
// Parameters: M, degree of b(X); BPOLY, coefficients b_0 .. b_M (bit i = b_i).
// No multiplier is given numerically for this circuit, so the default b(X) is
// X^3 + X + 1, the generator of the introductory division example.
//
// Interface: shift_en is the clock pulse (one coefficient per enabled cycle),
// in_bit the input coefficient, out_bit the product coefficient for the
// current input (combinational from in_bit and the last stage). rst_n
// (synchronous, active low) sets all registers to 0.
//
// Source and choices: the structure follows the CRC thesis this design is
// based on; the default b(X) and the synchronous reset are this design's own.
module poly_mul #(
  parameter int unsigned  M     = 3,
  parameter logic [M:0]   BPOLY = {1'b1, crc_pkg::CRC3_EXAMPLE_POLY}
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift_en,
  input  logic in_bit,
  output logic out_bit
);

  logic [M-1:0] q;

  for (genvar i = 0; i < int'(M); i++) begin : g_stage
    mod2_stage #(.TAP(BPOLY[i])) u_stage (
      .clk     (clk),
      .rst_n   (rst_n),
      .shift_en(shift_en),
      .d_in    ((i == 0) ? 1'b0 : q[(i == 0) ? 0 : i-1]),
      .tap_in  (in_bit),
      .q       (q[i])
    );
  end

  assign out_bit = q[M-1] ^ (BPOLY[M] & in_bit);

endmodule
