# CRC-protected serial link with retransmission on error

A serial data link cannot be made error-free: impulse noise, crosstalk and
line outages flip bits, and they tend to flip several neighbouring bits at
once (a 0.01 s noise burst at 9600 bit/s destroys 96 bits). This design makes
such errors detectable. The receiver then asks for the message again. It does
this with a Cyclic Redundancy Check (CRC):

* The message bits are the coefficients of a polynomial M(X), highest order
  first.
* The transmitter appends R(X) = X^M M(X) mod g(X), where g(X) is a fixed
  generator polynomial of degree M and all arithmetic is modulo 2 (addition
  and subtraction are XOR, with no carries).
* The transmitted word F(X) = X^M M(X) + R(X) is then an exact multiple of
  g(X).
* The receiver divides what it receives by g(X). A non-zero remainder means
  the word was damaged. Any error burst of M or fewer adjacent bits always
  gives a non-zero remainder.

All of this hardware is a serial polynomial divider, an M-stage shift register
with XOR feedback, and the same circuit serves both the encoder and the
checker. The main configuration is 12-bit messages, M = 8 and
g(X) = X^8 + X^4 + X + 1, which detects every burst of up to 8 bits. The
generator and the sizes are parameters, so CRC-16 (X^16 + X^15 + X^2 + 1) is
one parameter change away.

Around the CRC sits a stop-and-wait retransmission-on-error protocol:

* The receiver answers each frame with ACK (no error: the message is
  delivered and the transmitter takes the next one) or NAK (send the same
  message again).
* After a fixed number of failed receptions of one message (4 by default), the
  receiver answers ERR. The transmitter then stops and signals a link error.

## Modules

| module | role |
|---|---|
| `crc_pkg` | generator constants (X^3+X+1, X^8+X^4+X+1, CRC-16) and the answer type `rsp_t` (ACK/NAK/ERR) |
| `mod2_stage` | one shift-register stage: constant multiplier (wire or none), XOR adder, D flip-flop |
| `poly_div` | serial divider by a fixed g(X), built from M `mod2_stage`s |
| `poly_mul` | serial multiplier by a fixed b(X), built from M `mod2_stage`s |
| `crc_encoder` | sends the message, then its M check bits |
| `crc_checker` | divides a received frame, flags a non-zero remainder |
| `tx_station` | message register + retransmission control + `crc_encoder` |
| `rx_station` | `crc_checker` + message register + ACK/NAK/ERR answer |
| `crc_link` | top: both stations with the channel brought out, and `poly_mul` beside them |

All logic uses one clock `clk` and a synchronous, active-low reset `rst_n` that
clears every register.

## The divider: how the remainder appears in a shift register

`poly_div` is the part that is hardest to read from the code. Stage i holds the
coefficient of X^i of the running partial remainder, and each shift moves
everything one stage up. The bit leaving the top stage (`quot`) is the next
quotient coefficient. Subtracting quot·g(X) from the partial dividend means
XORing `quot` into the input of every stage i where g_i = 1. The leading
coefficient g_M is always 1 in GF(2), so the top needs no gate. For
X^8 + X^4 + X + 1 there are adders in front of stages 0, 1 and 4.

Feed in the dividend highest-order coefficient first. The first quotient bit
appears at `quot` after M shifts. When the last coefficient is in, `rem` holds
the remainder: bit i is the coefficient of X^i.

Worked example. Divide X^6 + X^3 (1001000) by X^3 + X + 1. The register,
listed stage 0 first, goes 100, 010, 001, 010, 001, 110, 011. The quotient
bits 1, 0, 1, 0 (X^3 + X) leave after pulses 3 to 6. The remainder is 011,
that is X^2 + X.

`start` marks the first coefficient of a new dividend: that shift treats the
register as all zeros. Dividends can therefore follow each other with no
clear cycle in between.

`poly_mul` mirrors the divider. The input, multiplied by b_i, is XORed in front
of every stage i, and the output is the top stage plus b_M times the input.
Feed a(X) highest order first and then M zeros. The output gives the product
coefficients highest order first, and the registers end at zero.

## Encoder and checker timing

`crc_encoder` takes one message bit per cycle (`in_valid`/`in_ready`,
`in_last` on the last bit) and puts it straight on the line. It also shifts
the bit into the divider. The prescaling by X^M is done literally: after the
last message bit the divider is clocked M times with 0 at its input, and the
line is idle during those cycles. The M remainder bits then go out highest
order first, with `out_last` on the last one. A k-bit message therefore takes
k + 2M cycles, and the line carries k + M bits.

Example: 101100100011 leaves as 101100100011 11111001. The message occupies
cycles 0–11, cycles 12–19 are idle, and the check bits occupy cycles 20–27.

`crc_checker` shifts every received bit, check bits included, into the same
divider. The receiver does no prescaling. One cycle after the bit marked
`in_last`, `done` pulses, `remainder` holds the result and `error = |remainder`.
The result stays until the next frame begins.

Example:

* Received intact, 10110010001111111001 leaves remainder 0.
* Received as 11000000101111111001, with an 8-bit burst spanning bits 2 to 9
  (bits 2, 3, 4, 7 and 9 flipped), it leaves X^7+X^5+X^4+X^3+X^2. The error
  is flagged.

## The link and its protocol

`tx_station` accepts a K-bit message (`msg_valid`/`msg_ready`) and sends it
through the encoder. It then waits for an answer on `rsp_valid`/`rsp_code`:

* ACK: `sent` pulses and the station is ready again.
* NAK: the same message is sent again, and `retries` counts up.
* ERR: the station stops with `link_error` high until reset.

`rx_station` knows the fixed frame length N = K + M and counts bits on the line
to find the frame end. The line carries only a bit and a valid strobe, with no
framing characters. The station keeps the first K bits as the message. One
cycle after the last bit it answers:

* ACK when the remainder is zero. The message is delivered on
  `msg_valid`/`msg_data`.
* ERR when this is the MAX_TRIES-th failure in a row. `give_up` pulses.
* NAK otherwise.

The failure counter restarts after every ACK and every ERR.

`crc_link` does not connect the two stations directly. The channel is a wire,
a telephone line or a radio path, not logic, so both directions are ports:

* `line_tx_*` leaves the transmitter and `line_rx_*` enters the receiver.
* `rsp_tx_*` leaves the receiver and `rsp_rx_*` enters the transmitter.

Tie them together for an error-free link, or put a channel model in between,
as the end-to-end test bench does. `pm_*` are the ports of the independent
multiplier.

Parameters of `crc_link`:

| parameter | default | meaning |
|---|---|---|
| `K` | 12 | message bits per frame |
| `M` | 8 | check bits, degree of g(X) |
| `GPOLY` | `8'h13` | g_0..g_{M-1} of g(X) = X^8+X^4+X+1 (g_M = 1 implied) |
| `MAX_TRIES` | 4 | failed receptions of one message before ERR |
| `PM_M`, `PM_BPOLY` | 3, `4'b1011` | degree and coefficients b_0..b_M of the multiplier's b(X) |

For CRC-16 on 8-bit words use `K=8, M=16, GPOLY=16'h8005`
(`crc_pkg::CRC16_POLY`).

## Where this design departs from, or adds to, its source

The circuits (shift-register stages, divider, multiplier), the main generator
and sizes, the prescale-by-zeros encoding and the divide-everything check
follow the CRC treatment this design is based on (a 1983 thesis on CRC error
detection). The design reproduces its clock-by-clock tables exactly, with the
exceptions below.

* One step of the small division example differs. After the 7th and last
  pulse, the source's table lists the divider output as 0. Here the output is
  always the top stage, which then holds 1 (the remainder's X^2 term). The
  quotient bits and the remainder agree.
* The retry limit, the ACK/NAK/ERR encoding and the separate answer path are
  this design's choices. The source gives the ACK/NAK exchange and says only
  that the receiver signals an error after "a pre-determined number" of
  transmissions.
* The message envelope of a full protocol (sync, header, address and
  end-of-message characters) is not built. No widths or codes are defined for
  it. Frames here are the message followed by the check bits, at a fixed
  length.
* The idle gap of M cycles between message and check bits, the valid/ready
  handshakes, the `start` input of the divider and the synchronous reset are
  this design's own.
* Simple parity (VRC) and longitudinal parity (LRC) appear in the source only
  as weaker schemes for comparison, and are not included.

## Verification

Every module has a self-checking test bench in `tb/`, and `tb/crc_ref_pkg.sv`
holds the reference arithmetic. Expected values come from schoolbook long
division and multiplication, not from a shift-register model. The test benches
cover:

* `tb_mod2_stage`: the XOR adder truth table, and both tap settings.
* `tb_poly_div`: the small division example and the three 20-pulse tables of
  the main example, step by step. Also random dividends for X^8+X^4+X+1 and
  CRC-16, back to back and with idle cycles.
* `tb_poly_mul`: (X^3+1)(X^3+X+1) = X^6+X^4+X+1, and random products for two
  multipliers.
* `tb_crc_encoder`: the main example bit for bit with its 28-cycle timing, and
  random messages for the 8-bit generator and CRC-16.
* `tb_crc_checker`:
  * the clean and damaged example frames;
  * every single-bit error in the example frame;
  * random bursts of up to M bits, all caught, for both generators;
  * random long error patterns, caught exactly when long division says they
    should be.
* `tb_tx_station`, `tb_rx_station`: the ACK, NAK and ERR sequences, the retry
  counting, and the timing of the answers.
* `tb_crc_link`: runs the top at its default parameters with a channel model:
  * clean messages;
  * bursts that force retransmission;
  * a 96-bit noise burst that makes the receiver give up;
  * recovery after reset;
  * a multiplication.

  It checks every delivered message and every answer. It also checks that
  each of these mechanisms happened at least once.
* `tb_crc_link_crc16`: the same end-to-end run with the link set to CRC-16
  on 8-bit words (`K=8, M=16, GPOLY=16'h8005`).

Each test bench ends by printing `TB_RESULT checks=<n> failures=<n>`, and has a
watchdog. To run one with Verilator:

    verilator --binary --timing --assert -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
      -Irtl -Itb rtl/crc_pkg.sv tb/crc_ref_pkg.sv tb/tb_crc_link.sv --top-module tb_crc_link
    ./obj_dir/Vtb_crc_link

Every test runs in well under a second.
