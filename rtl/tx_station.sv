// tx_station: transmitting station of a stop-and-wait retransmission-on-error
// link. It holds one K-bit message, sends it through a crc_encoder, and waits
// for the receiver's answer: ACK releases the message and the station takes
// the next one; NAK sends the same message again; ERR (the receiver's error
// signal after too many failed attempts) stops the station with link_error
// high until reset.
//
// How it works: a message register loaded on msg_valid & msg_ready is shifted
// out highest-order bit first into the encoder (one bit per cycle), the last
// bit marked in_last. The station then waits for rsp_valid. The number of
// times the current message has been sent again is given on retries.
//
// Interface: msg_valid/msg_ready/msg_data from the user; line_valid/line_bit
// to the channel; rsp_valid/rsp_code from the reverse channel; sent pulses for
// one cycle when a message is acknowledged; link_error is sticky. Timing: one
// frame takes K + 2M cycles on the line side, after which the station waits
// for the answer for as long as it takes. rst_n is synchronous, active low.
//
// Source and choices: the ACK/NAK exchange and stopping on the receiver's
// error signal follow the retransmission-on-error scheme of the CRC thesis
// this design is based on; the handshakes, the answer encoding and the
// unlimited wait for an answer are this design's own.
module tx_station
  import crc_pkg::*;
#(
  parameter int unsigned  K     = 12,
  parameter int unsigned  M     = 8,
  parameter logic [M-1:0] GPOLY = crc_pkg::CRC8_EXAMPLE_POLY,
  parameter int unsigned  RW    = 4      // width of the retry counter
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          msg_valid,
  output logic          msg_ready,
  input  logic [K-1:0]  msg_data,
  output logic          line_valid,
  output logic          line_bit,
  input  logic          rsp_valid,
  input  rsp_t          rsp_code,
  output logic          sent,
  output logic          link_error,
  output logic [RW-1:0] retries
);

  typedef enum logic [1:0] {T_IDLE, T_SEND, T_WAIT, T_FAIL} tstate_t;

  localparam int unsigned IW = (K > 1) ? $clog2(K) : 1;

  tstate_t        state;
  logic [K-1:0]   msg_q;
  logic [IW-1:0]  idx;        // bit of msg_q being sent, K-1 down to 0
  logic           enc_valid;
  logic           enc_ready;
  logic           enc_bit;
  logic           enc_last;
  logic           enc_out_last;

  always_comb begin
    enc_valid = (state == T_SEND);
    enc_bit   = |(msg_q & (K'(1) << idx));
    enc_last  = (idx == '0);
  end

  crc_encoder #(.M(M), .GPOLY(GPOLY)) u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (enc_valid),
    .in_ready (enc_ready),
    .in_bit   (enc_bit),
    .in_last  (enc_last),
    .out_valid(line_valid),
    .out_bit  (line_bit),
    .out_last (enc_out_last)
  );

  assign msg_ready  = (state == T_IDLE);
  assign link_error = (state == T_FAIL);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= T_IDLE;
      msg_q   <= '0;
      idx     <= '0;
      sent    <= 1'b0;
      retries <= '0;
    end else begin
      sent <= 1'b0;
      unique case (state)
        T_IDLE: if (msg_valid) begin
          msg_q   <= msg_data;
          idx     <= IW'(K - 1);
          retries <= '0;
          state   <= T_SEND;
        end
        T_SEND: if (enc_ready) begin
          if (idx == '0) state <= T_WAIT;
          else           idx   <= idx - IW'(1);
        end
        T_WAIT: if (rsp_valid) begin
          unique case (rsp_code)
            RSP_ACK: begin
              sent  <= 1'b1;
              state <= T_IDLE;
            end
            RSP_NAK: begin
              idx     <= IW'(K - 1);
              retries <= retries + RW'(1);
              state   <= T_SEND;
            end
            default: state <= T_FAIL;
          endcase
        end
        T_FAIL: ;
        default: state <= T_IDLE;
      endcase
    end
  end

  // The end of the frame on the line is not needed here: the station waits
  // for the answer, which can only come after the whole frame.
  logic unused_out_last;
  assign unused_out_last = enc_out_last;

  a_rsp_only_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid |-> (state == T_WAIT));

endmodule
