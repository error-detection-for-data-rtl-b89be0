// tb_rx_station: checks the receiving station. The test bench plays the
// transmitter and the channel: it sends 20-bit frames (12 message bits and 8
// check bits from schoolbook long division), some with bits flipped, with
// random idle cycles on the line, and checks each answer:
//   clean frame                     -> ACK, message delivered, unchanged
//   damaged frame                   -> NAK, nothing delivered
//   4th damaged frame in a row      -> ERR (give_up), counter starts again
//   ACK after damaged frames        -> counter starts again
// The answer must come exactly one cycle after the last bit of the frame.
module tb_rx_station;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  localparam int K = 12;
  localparam int M = 8;

  logic clk;
  logic rst_n;
  int   checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic         line_valid, line_bit, rsp_valid, msg_valid, give_up;
  rsp_t         rsp_code;
  logic [K-1:0] msg_data;
  logic [M-1:0] remainder;

  rx_station dut (.clk, .rst_n, .line_valid, .line_bit, .rsp_valid, .rsp_code,
    .msg_valid, .msg_data, .give_up, .remainder);

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // send one frame of msg with error pattern e; check the answer
  task automatic frame(logic [K-1:0] msg, logic [63:0] e, rsp_t exp_rsp, string name);
    logic [63:0] f;
    f = ((64'(msg) << M) | ref_crc(64'(msg), K, M, 64'h113)) ^ e;
    for (int i = K + M - 1; i >= 0; i--) begin
      while ($urandom_range(0, 4) == 0) begin
        line_valid = 1'b0; @(posedge clk); #1;
        check(64'(rsp_valid), 0, {name, ": no answer inside a frame"});
      end
      line_valid = 1'b1; line_bit = f[i];
      @(posedge clk); #1;
      if (i != 0) check(64'(rsp_valid), 0, {name, ": no answer inside a frame"});
    end
    line_valid = 1'b0;
    check(64'(rsp_valid), 1, {name, ": answer one cycle after last bit"});
    check(64'(rsp_code), 64'(exp_rsp), {name, ": answer code"});
    check(64'(msg_valid), 64'(exp_rsp == RSP_ACK), {name, ": delivered only on ACK"});
    if (exp_rsp == RSP_ACK) check(64'(msg_data), 64'(msg), {name, ": delivered message"});
    check(64'(give_up), 64'(exp_rsp == RSP_ERR), {name, ": give_up"});
    check(64'(remainder), ref_mod(f, K + M, M, 64'h113), {name, ": remainder"});
  endtask

  function automatic logic [63:0] burst();
    int len = 1 + int'($urandom_range(0, 7));
    logic [63:0] e = 64'($urandom) & ((64'd1 << len) - 64'd1);
    e[0] = 1'b1; e[len-1] = 1'b1;
    return e << $urandom_range(0, K + M - len);
  endfunction

  initial begin
    logic [K-1:0] m;
    rst_n = 1'b0; line_valid = 1'b0; line_bit = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    frame(12'b101100100011, '0, RSP_ACK, "example clean");
    // bits 2,3,4,7,9 from the left of the 20-bit frame
    frame(12'b101100100011, 64'b01110010100000000000, RSP_NAK, "example burst");
    frame(12'b101100100011, '0, RSP_ACK, "example resent");

    // four failures in a row -> ERR on the fourth
    m = 12'h3C5;
    frame(m, burst(), RSP_NAK, "fail 1");
    frame(m, burst(), RSP_NAK, "fail 2");
    frame(m, burst(), RSP_NAK, "fail 3");
    frame(m, burst(), RSP_ERR, "fail 4");
    // counter restarted after ERR
    frame(m, burst(), RSP_NAK, "after ERR fail 1");
    frame(m, '0, RSP_ACK, "after ERR clean");
    // counter restarted after ACK: three more failures are still NAK
    frame(m, burst(), RSP_NAK, "after ACK fail 1");
    frame(m, burst(), RSP_NAK, "after ACK fail 2");
    frame(m, burst(), RSP_NAK, "after ACK fail 3");
    frame(m, '0, RSP_ACK, "after ACK clean");

    for (int t = 0; t < 100; t++) begin
      m = 12'($urandom);
      if (t % 2 == 0) frame(m, '0, RSP_ACK, $sformatf("random %0d clean", t));
      else begin
        frame(m, burst(), RSP_NAK, $sformatf("random %0d damaged", t));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
