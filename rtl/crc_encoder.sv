// crc_encoder: transmitter-side CRC generator. It sends a serial message
// unchanged and appends the M-bit remainder of X^M * M(X) divided by g(X),
// so that the transmitted code polynomial F(X) = X^M M(X) + R(X) is an exact
// multiple of g(X).
//
// How it works: the message coefficients, highest order first, go both to the
// line and into a poly_div. The prescaling by X^M is done the direct way: after
// the last message bit the divider is clocked M more times with 0 at its input
// (PAD). The divider then holds R(X), which is sent highest order first (CRC).
// The divider is held during CRC and restarted by the first bit of the next
// message.
//
// Interface: in_valid/in_ready/in_bit/in_last take one message bit per cycle;
// in_ready is low during PAD and CRC. out_valid/out_bit/out_last carry the
// code message to the line, one bit per cycle with no back-pressure; out_last
// marks the last check bit. Timing: a k-bit message accepted on k consecutive
// cycles leaves on those same cycles, then M idle cycles, then M check bits:
// k + 2M cycles per frame. rst_n is synchronous, active low.
//
// Source and choices: prescaling by clocking M zeros through the divider and
// sending R(X) after the message follow the CRC thesis this design is based
// on; the handshake, the idle line during PAD and the timing are this
// design's own.
module crc_encoder #(
  parameter int unsigned  M     = 8,
  parameter logic [M-1:0] GPOLY = crc_pkg::CRC8_EXAMPLE_POLY
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  input  logic in_last,
  output logic out_valid,
  output logic out_bit,
  output logic out_last
);

  typedef enum logic [1:0] {S_MSG, S_PAD, S_CRC} state_t;

  localparam int unsigned CW = $clog2(M + 1);

  state_t          state;
  logic [CW-1:0]   cnt;      // PAD: zeros still to feed; CRC: check bits still to send
  logic            first;    // next message bit starts a new dividend
  logic            div_shift;
  logic            div_in;
  logic            div_quot;
  logic [M-1:0]    div_rem;

  poly_div #(.M(M), .GPOLY(GPOLY)) u_div (
    .clk     (clk),
    .rst_n   (rst_n),
    .shift_en(div_shift),
    .start   (first & (state == S_MSG)),
    .in_bit  (div_in),
    .quot    (div_quot),
    .rem     (div_rem)
  );

  always_comb begin
    in_ready  = (state == S_MSG);
    div_shift = 1'b0;
    div_in    = 1'b0;
    out_valid = 1'b0;
    out_bit   = 1'b0;
    out_last  = 1'b0;
    unique case (state)
      S_MSG: begin
        div_shift = in_valid;
        div_in    = in_bit;
        out_valid = in_valid;
        out_bit   = in_bit;
      end
      S_PAD: begin
        div_shift = 1'b1;
        div_in    = 1'b0;
      end
      S_CRC: begin
        out_valid = 1'b1;
        out_bit   = |(div_rem & (M'(1) << (cnt - CW'(1))));
        out_last  = (cnt == CW'(1));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_MSG;
      cnt   <= '0;
      first <= 1'b1;
    end else begin
      unique case (state)
        S_MSG: if (in_valid) begin
          first <= in_last;
          if (in_last) begin
            state <= S_PAD;
            cnt   <= CW'(M);
          end
        end
        S_PAD: begin
          cnt <= cnt - CW'(1);
          if (cnt == CW'(1)) begin
            state <= S_CRC;
            cnt   <= CW'(M);
          end
        end
        S_CRC: begin
          cnt <= cnt - CW'(1);
          if (cnt == CW'(1)) state <= S_MSG;
        end
        default: state <= S_MSG;
      endcase
    end
  end

  // The divider's quotient line is not needed by the encoder; only the
  // remainder is sent.
  logic unused_quot;
  assign unused_quot = div_quot;

  a_no_line_in_pad: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_PAD) |-> !out_valid);

endmodule
