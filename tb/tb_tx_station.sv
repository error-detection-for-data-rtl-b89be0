// tb_tx_station: checks the transmitting station. The test bench plays the
// receiver: it collects each frame from the line, compares it with the
// message followed by its CRC (schoolbook long division), and answers after a
// random delay following a script:
//   message A: ACK                         -> sent, 0 retries
//   message B: NAK, NAK, ACK               -> same frame 3 times, 2 retries
//   random messages: random NAK/ACK        -> retransmissions counted
//   last message: NAK, ERR                 -> link_error, station stops
// Also checked: K + 2M cycles from the first to the last line bit of a frame,
// msg_ready only while idle, nothing on the line after link_error.
module tb_tx_station;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  localparam int K = 12;
  localparam int M = 8;

  logic clk;
  logic rst_n;
  int   checks = 0, failures = 0;
  int   cycle = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic         msg_valid, msg_ready, line_valid, line_bit, rsp_valid, sent, link_error;
  logic [K-1:0] msg_data;
  rsp_t         rsp_code;
  logic [3:0]   retries;

  tx_station dut (.clk, .rst_n, .msg_valid, .msg_ready, .msg_data, .line_valid,
    .line_bit, .rsp_valid, .rsp_code, .sent, .link_error, .retries);

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // collect one frame of K+M bits from the line
  task automatic get_frame(output logic [63:0] f, output int first_c, output int last_c);
    int n;
    f = '0; n = 0; first_c = 0; last_c = 0;
    while (n < K + M) begin
      @(posedge clk);
      if (line_valid) begin
        if (n == 0) first_c = cycle;
        last_c = cycle;
        f = {f[62:0], line_bit};
        n++;
      end
    end
    #1;
  endtask

  task automatic answer(rsp_t code);
    repeat ($urandom_range(1, 6)) @(posedge clk);
    #1;
    rsp_valid = 1'b1; rsp_code = code;
    @(posedge clk); #1;
    rsp_valid = 1'b0;
  endtask

  // one message, answered by the script; returns nothing, checks everything
  task automatic exchange(logic [K-1:0] msg, rsp_t script[], string name);
    logic [63:0] f, expf;
    int c0, c1;
    while (!msg_ready) begin @(posedge clk); #1; end
    msg_valid = 1'b1; msg_data = msg;
    @(posedge clk); #1;
    msg_valid = 1'b0;
    check(64'(msg_ready), 0, {name, ": busy after accepting"});
    expf = (64'(msg) << M) | ref_crc(64'(msg), K, M, 64'h113);
    foreach (script[j]) begin
      get_frame(f, c0, c1);
      check(f, expf, $sformatf("%s: frame %0d", name, j));
      check(64'(c1 - c0), 64'(K + 2 * M - 1), $sformatf("%s: frame %0d spans K+2M cycles", name, j));
      check(64'(retries), 64'(j), $sformatf("%s: retries before answer %0d", name, j));
      answer(script[j]);
      if (script[j] == RSP_ACK) begin
        check(64'(sent), 1, {name, ": sent pulse after ACK"});
        check(64'(msg_ready), 1, {name, ": ready after ACK"});
      end else if (script[j] == RSP_NAK) begin
        check(64'(msg_ready), 0, {name, ": still busy after NAK"});
        check(64'(sent), 0, {name, ": no sent pulse after NAK"});
      end else if (script[j] == RSP_ERR) begin
        check(64'(link_error), 1, {name, ": link_error after ERR"});
      end
    end
  endtask

  initial begin
    rsp_t s[];
    int nnak;
    rst_n = 1'b0; msg_valid = 1'b0; msg_data = '0; rsp_valid = 1'b0; rsp_code = RSP_ACK;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(64'(msg_ready), 1, "ready after reset");
    check(64'(link_error), 0, "no link_error after reset");

    exchange(12'b101100100011, '{RSP_ACK}, "A");
    exchange(12'hA5C, '{RSP_NAK, RSP_NAK, RSP_ACK}, "B");
    for (int t = 0; t < 40; t++) begin
      nnak = int'($urandom_range(0, 3));
      s = new[nnak + 1];
      foreach (s[j]) s[j] = (j == nnak) ? RSP_ACK : RSP_NAK;
      exchange(12'($urandom), s, $sformatf("random %0d", t));
    end
    exchange(12'h0F0, '{RSP_NAK, RSP_ERR}, "last");

    // the station has stopped: nothing more on the line, not ready
    msg_valid = 1'b1; msg_data = 12'h123;
    for (int i = 0; i < 50; i++) begin
      @(posedge clk);
      if (line_valid) begin failures++; $display("FAIL line active after ERR"); break; end
    end
    #1;
    checks++;
    check(64'(msg_ready), 0, "not ready after ERR");
    check(64'(link_error), 1, "link_error sticky");
    msg_valid = 1'b0;
    rst_n = 1'b0; @(posedge clk); #1; rst_n = 1'b1;
    check(64'(link_error), 0, "reset clears link_error");

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
