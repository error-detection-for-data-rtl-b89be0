// tb_crc_link: end-to-end test of the whole link at its default size (12-bit
// messages, 8 check bits, g(X) = X^8 + X^4 + X + 1, 4 tries).
//
// The test bench provides the channel: the forward line passes each bit
// through, XORed with an error pattern chosen for that frame, and the answers
// travel back with a fixed 3-cycle delay. Scenarios:
//   1. clean channel: messages delivered in order, one frame each;
//   2. one burst of up to 8 bits on the first attempt: NAK, the message is
//      sent again and delivered intact;
//   3. a 96-bit noise burst (0.01 s of noise at 9600 bit/s) covering about
//      five frames: every hit frame refused, and after 4 tries the receiver
//      gives up (ERR) and the transmitter stops with link_error;
//   4. after reset the link works again.
// Every delivered message is compared with the one sent; the answer expected
// for a damaged frame is worked out from its error pattern by long division.
// Beside the link, the multiplier computes (X^3 + 1)(X^3 + X + 1).
// Each mechanism (first-try delivery, detection with retransmission, give-up,
// multiplication) is counted and must have happened at least once.
module tb_crc_link;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  localparam int K = 12;
  localparam int M = 8;
  localparam int N = K + M;
  localparam logic [63:0] GFULL = 64'h113;     // g(X) with its leading term
  localparam bit EXAMPLE = (K == 12 && M == 8); // worked-example frames apply

  logic clk;
  logic rst_n;
  int   checks = 0, failures = 0;
  int   cycle = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic         tx_msg_valid, tx_msg_ready, tx_sent, tx_link_error;
  logic [K-1:0] tx_msg_data;
  logic [3:0]   tx_retries;
  logic         line_tx_valid, line_tx_bit, line_rx_valid, line_rx_bit;
  logic         rsp_tx_valid, rsp_rx_valid;
  rsp_t         rsp_tx_code, rsp_rx_code;
  logic         rx_msg_valid, rx_give_up;
  logic [K-1:0] rx_msg_data;
  logic [M-1:0] rx_remainder;
  logic         pm_shift_en, pm_in_bit, pm_out_bit;

  crc_link dut (.*);

  // ---------------- channel model ----------------
  logic [N-1:0] err_q[$];      // error pattern per frame, MSB hits the first bit
  logic [N-1:0] cur_err;
  int           bit_no;        // position in the current frame
  int           frames_hit;

  always_comb begin
    line_rx_valid = line_tx_valid;
    line_rx_bit   = line_tx_bit ^ (cur_err[N-1-bit_no] & line_tx_valid);
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      bit_no <= 0;
    end else if (line_tx_valid) begin
      if (bit_no == N - 1) begin
        bit_no  <= 0;
        cur_err <= (err_q.size() != 0) ? err_q.pop_front() : '0;
      end else begin
        bit_no <= bit_no + 1;
      end
    end
  end

  logic [2:0] rsp_v_d;
  rsp_t       rsp_c_d[3];
  always @(posedge clk) begin
    if (!rst_n) rsp_v_d <= '0;
    else begin
      rsp_v_d    <= {rsp_v_d[1:0], rsp_tx_valid};
      rsp_c_d[0] <= rsp_tx_code;
      rsp_c_d[1] <= rsp_c_d[0];
      rsp_c_d[2] <= rsp_c_d[1];
    end
  end
  assign rsp_rx_valid = rsp_v_d[2];
  assign rsp_rx_code  = rsp_c_d[2];

  // ---------------- scoreboard ----------------
  logic [K-1:0] expect_q[$];
  rsp_t         exp_rsp_q[$];
  int n_first_try = 0, n_retransmit = 0, n_nak = 0, n_give_up = 0, n_delivered = 0;
  int n_mul = 0;
  int line_first, line_last, frame_bits;

  always @(posedge clk) if (rst_n) begin
    if (rx_msg_valid) begin
      n_delivered++;
      checks++;
      if (expect_q.size() == 0 || rx_msg_data !== expect_q[0]) begin
        failures++;
        $display("FAIL delivered %h, expected %h", rx_msg_data,
                 expect_q.size() ? expect_q[0] : '0);
      end
      if (expect_q.size() != 0) void'(expect_q.pop_front());
    end
    if (rsp_tx_valid) begin
      checks++;
      if (exp_rsp_q.size() == 0 || rsp_tx_code !== exp_rsp_q[0]) begin
        failures++;
        $display("FAIL answer %s, expected %s", rsp_tx_code.name(),
                 exp_rsp_q.size() ? exp_rsp_q[0].name() : "none");
      end
      if (exp_rsp_q.size() != 0) void'(exp_rsp_q.pop_front());
      if (rsp_tx_code == RSP_NAK) n_nak++;
      if (rsp_tx_code == RSP_ERR) n_give_up++;
    end
    // frame timing on the line: K + 2M cycles from first to last bit + 1
    if (line_tx_valid) begin
      if (frame_bits == 0) line_first = cycle;
      frame_bits++;
      if (frame_bits == N) begin
        checks++;
        if (cycle - line_first != K + 2 * M - 1) begin
          failures++;
          $display("FAIL frame took %0d cycles", cycle - line_first + 1);
        end
        frame_bits = 0;
      end
    end
  end

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [N-1:0] burst(int maxlen);
    int len = 1 + int'($urandom_range(0, maxlen - 1));
    logic [63:0] e = {$urandom, $urandom} & ((64'd1 << len) - 64'd1);
    e[0] = 1'b1; e[len-1] = 1'b1;
    return N'(e << $urandom_range(0, N - len));
  endfunction

  // the answer the receiver must give to a frame hit by e
  function automatic bit detected(logic [N-1:0] e);
    return ref_mod(64'(e), N, M, GFULL) != 0;
  endfunction

  // Send one message; errs are the channel's patterns for its successive
  // attempts. Returns once the transmitter is idle again or has stopped.
  task automatic send(logic [K-1:0] msg, logic [N-1:0] errs[]);
    int tries = 0;
    bit fail_run = 1'b0;
    foreach (errs[j]) err_q.push_back(errs[j]);
    // expected answers: NAK per detected error, ERR at the 4th in a row
    for (int j = 0; j < errs.size(); j++) begin
      if (detected(errs[j])) begin
        tries++;
        if (tries == 4) begin exp_rsp_q.push_back(RSP_ERR); fail_run = 1'b1; break; end
        exp_rsp_q.push_back(RSP_NAK);
      end else begin
        exp_rsp_q.push_back(RSP_ACK);
        expect_q.push_back(msg);  // delivered as sent if the errors cancel out
        break;
      end
    end
    while (!tx_msg_ready) begin @(posedge clk); #1; end
    // the first pattern applies to this message's first frame
    if (bit_no == 0) cur_err = err_q.pop_front();
    tx_msg_valid = 1'b1; tx_msg_data = msg;
    @(posedge clk); #1;
    tx_msg_valid = 1'b0;
    while (!tx_sent && !tx_link_error) begin @(posedge clk); #1; end
    repeat (4) @(posedge clk); #1;
    if (fail_run) check(64'(tx_link_error), 1, "link_error after give-up");
    else begin
      check(64'(tx_link_error), 0, "no link_error");
      if (tries == 0) n_first_try++; else n_retransmit++;
    end
    err_q.delete();
  endtask

  initial begin
    logic [N-1:0] errs[];
    logic [63:0]  noise;
    logic [63:0]  prod;
    int           left;
    rst_n = 1'b0;
    {tx_msg_valid, pm_shift_en, pm_in_bit} = '0;
    tx_msg_data = '0; cur_err = '0; frame_bits = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. clean channel, the worked-example message first
    if (EXAMPLE) send(K'(12'b101100100011), '{N'(0)});
    for (int t = 0; t < 30; t++) send(K'($urandom), '{N'(0)});

    // 2. bursts of at most M bits on the first attempt (the worked-example
    //    burst first), then clean
    if (EXAMPLE) send(K'(12'b101100100011), '{N'(20'b01110010100000000000), N'(0)});
    for (int t = 0; t < 30; t++) begin
      errs = new[1 + (t % 3) + 1];
      foreach (errs[j]) errs[j] = (j == errs.size() - 1) ? N'(0) : burst(M);
      send(K'($urandom), errs);
    end

    // 3. a 96-bit noise burst: the frames it covers carry random noise
    left = 96;
    errs = new[6];
    foreach (errs[j]) begin
      noise = {$urandom, $urandom};
      errs[j] = (left >= N) ? N'(noise) : N'(noise) & ~((N'(1) << (N - left)) - N'(1));
      if (left > 0 && errs[j] == '0) errs[j] = N'(1) << (N - 1);
      left = (left > N) ? left - N : 0;
    end
    send(K'(12'hE3A), errs);
    check(64'(tx_msg_ready), 0, "transmitter stopped after ERR");

    // 4. reset brings the link back
    rst_n = 1'b0; @(posedge clk); #1; rst_n = 1'b1;
    expect_q.delete(); exp_rsp_q.delete(); frame_bits = 0; cur_err = '0;
    send(K'(12'h5A5), '{N'(0)});

    // multiplier: (X^3 + 1)(X^3 + X + 1) = X^6 + X^4 + X + 1
    prod = '0;
    for (int i = 6; i >= 0; i--) begin
      pm_shift_en = 1'b1; pm_in_bit = (i >= 3) ? 1'(4'b1001 >> (i - 3)) : 1'b0;
      #1 prod = {prod[62:0], pm_out_bit};
      @(posedge clk); #1;
    end
    pm_shift_en = 1'b0;
    check(prod, 64'b1010011, "multiplier product");
    if (prod == 64'b1010011) n_mul++;

    check(64'(expect_q.size()), 0, "every expected message delivered");
    $display("first-try deliveries %0d, deliveries after retransmission %0d, NAKs %0d, give-ups %0d, multiplications %0d",
             n_first_try, n_retransmit, n_nak, n_give_up, n_mul);
    check(64'(n_first_try > 0), 1, "mechanism: first-try delivery");
    check(64'(n_retransmit > 0), 1, "mechanism: error detected and message retransmitted");
    check(64'(n_nak > 0), 1, "mechanism: NAK");
    check(64'(n_give_up > 0), 1, "mechanism: give-up after retry limit");
    check(64'(n_mul > 0), 1, "mechanism: multiplication");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
