// poly_div: serial divider of a binary polynomial by a fixed generator g(X) of
// degree M, the linear-feedback shift register at the heart of the CRC.
//
// How it works: stages 0 .. M-1 form a shift register that moves towards stage
// M-1. The input coefficient enters the adder in front of stage 0. The output
// of the last stage is the quotient coefficient; it is fed back, multiplied by
// g_i, into the adder in front of every stage i where g_i = 1. This subtracts
// q*g(X) from the partial dividend on each shift (subtraction is addition in
// modulo-2 arithmetic). With g_M = 1 the 1/g_M multiplier on the output is a
// wire. After all n+1 coefficients f_n .. f_0 of the dividend have been
// shifted in (highest order first), the registers hold the remainder, stage i
// holding the coefficient of X^i.
//
// Parameters: M, the degree of g(X); GPOLY, the coefficients g_0 .. g_{M-1}
// (bit i = g_i). The default is X^8 + X^4 + X + 1, taps in front of stages 0,
// 1 and 4.
//
// Interface: shift_en applies one clock pulse to the circuit. start, together
// with shift_en, begins a new dividend: the shift then acts as if all
// registers held 0, so back-to-back dividends need no idle cycle between
// them. This is this design's stand-in for the reset line of the figure that
// sets all registers to 0; rst_n does the same at power-up. quot is the output
// line (the last stage); rem is the whole register, valid as the remainder
// once the last coefficient has been shifted in.
//
// Source and choices: the structure (register order, feedback taps, output
// from the last stage) and the default generator follow the CRC thesis this
// design is based on, and reproduce its clock-by-clock division tables; the
// start input and the synchronous reset are this design's own.
module poly_div #(
  parameter int unsigned     M     = 8,
  parameter logic [M-1:0]    GPOLY = crc_pkg::CRC8_EXAMPLE_POLY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_en,
  input  logic         start,
  input  logic         in_bit,
  output logic         quot,
  output logic [M-1:0] rem
);

  logic [M-1:0] q;        // stage outputs
  logic [M-1:0] q_eff;    // stage outputs as seen by the adders this shift
  logic         fb;

  always_comb begin
    q_eff = start ? '0 : q;
    fb    = q_eff[M-1];
  end

  for (genvar i = 0; i < int'(M); i++) begin : g_stage
    mod2_stage #(.TAP(GPOLY[i])) u_stage (
      .clk     (clk),
      .rst_n   (rst_n),
      .shift_en(shift_en),
      .d_in    ((i == 0) ? in_bit : q_eff[(i == 0) ? 0 : i-1]),
      .tap_in  (fb),
      .q       (q[i])
    );
  end

  assign quot = q[M-1];
  assign rem  = q;

endmodule
