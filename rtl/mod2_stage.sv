// mod2_stage: one stage of a polynomial shift-register circuit, built from the
// three elements of modulo-2 switching circuits: a constant multiplier, a
// modulo-2 adder and a one-clock storage register.
//
// The constant multiplier is the TAP parameter. TAP = 1 is a wire, so tap_in is
// added (XOR, no carry) to d_in before the flip-flop; TAP = 0 is no connection,
// so the stage is a plain delay. The register takes d_in ^ (TAP & tap_in) on a
// rising clock edge when shift_en is high and holds otherwise; shift_en plays
// the role of the shifting clock pulse.
//
// Interface: clk, active-low synchronous reset rst_n (clears the stage to 0, as
// the circuits require all registers to start at 0), shift_en, d_in from the
// previous stage, tap_in from the feedback or input line, q the stored bit.
// Timing: q is the value that was at the adder output before the last shift.
//
// Source and choices: the three elements and their meaning follow the CRC
// thesis this design is based on; the clock enable and synchronous reset are
// this design's own.
module mod2_stage #(
  parameter bit TAP = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift_en,
  input  logic d_in,
  input  logic tap_in,
  output logic q
);

  logic sum;

  always_comb sum = d_in ^ (TAP & tap_in);

  always_ff @(posedge clk) begin
    if (!rst_n)        q <= 1'b0;
    else if (shift_en) q <= sum;
  end

endmodule
