// tb_crc_checker: checks the receiver-side CRC check.
//
//  - The worked example: 10110010001111111001 received without error gives
//    remainder 0 and no error; received as 11000000101111111001 (an 8-bit
//    burst) it gives remainder X^7+X^5+X^4+X^3+X^2 and flags an error.
//  - done comes exactly one cycle after the last bit; result held until the
//    next frame starts.
//  - Every single-bit error in the example frame is caught.
//  - Random frames built with schoolbook long division, sent back to back:
//    clean frames pass; frames hit by any burst no longer than M bits are
//    always caught; frames hit by random longer error patterns are caught
//    exactly when the error polynomial is not a multiple of g(X). Both the
//    default 8-bit generator and CRC-16.
module tb_crc_checker;
  import crc_ref_pkg::*;

  logic clk;
  logic rst_n;
  int   checks = 0, failures = 0;
  int   bursts_caught = 0, long_missed = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic        v8, b8, l8, done8, err8;
  logic [7:0]  rem8;
  logic        v16, b16, l16, done16, err16;
  logic [15:0] rem16;

  crc_checker dut8 (.clk, .rst_n, .in_valid(v8), .in_bit(b8), .in_last(l8),
    .done(done8), .error(err8), .remainder(rem8));
  crc_checker #(.M(16), .GPOLY(crc_pkg::CRC16_POLY)) dut16 (.clk, .rst_n,
    .in_valid(v16), .in_bit(b16), .in_last(l16), .done(done16), .error(err16),
    .remainder(rem16));

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // send a frame to both checkers (the 16-bit one only when use16)
  task automatic send(logic [63:0] f, int n, bit use16, bit use8);
    for (int i = n - 1; i >= 0; i--) begin
      v8  = use8;  b8  = f[i]; l8  = (i == 0);
      v16 = use16; b16 = f[i]; l16 = (i == 0);
      @(posedge clk); #1;
      if (i != 0) begin
        check(64'(done8 & use8), 0, "no done inside a frame");
      end
    end
    {v8, l8, v16, l16} = '0;
  endtask

  initial begin
    logic [63:0] msg, frame, e;
    int k, n, len, pos;
    rst_n = 1'b0;
    {v8, b8, l8, v16, b16, l16} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    send(64'b10110010001111111001, 20, 1'b0, 1'b1);
    check(64'(done8), 1, "example clean: done one cycle after last bit");
    check(64'(err8), 0, "example clean: no error");
    check(64'(rem8), 0, "example clean: remainder 0");
    @(posedge clk); #1;
    check(64'(done8), 0, "done is a pulse");
    check(64'(rem8), 0, "remainder held");

    send(64'b11000000101111111001, 20, 1'b0, 1'b1);
    check(64'(done8), 1, "example burst: done");
    check(64'(err8), 1, "example burst: error flagged");
    check(64'(rem8), stage_vec("00111101"), "example burst: remainder");
    repeat (3) @(posedge clk); #1;
    check(64'(err8), 1, "error held until next frame");

    // every single-bit error in the example frame is caught
    for (int p = 0; p < 20; p++) begin
      send(64'b10110010001111111001 ^ (64'd1 << p), 20, 1'b0, 1'b1);
      check(64'(err8), 1, $sformatf("single error at X^%0d caught", p));
      check(64'(rem8), ref_mod(64'd1 << p, 20, 8, 64'h113), $sformatf("single error at X^%0d remainder", p));
    end

    // random frames, back to back
    for (int t = 0; t < 600; t++) begin
      k = 1 + int'($urandom_range(0, 40));
      msg = {$urandom, $urandom} & ((64'd1 << k) - 64'd1);
      if (t % 2 == 0) begin
        // default generator
        n = k + 8;
        frame = (msg << 8) | ref_crc(msg, k, 8, 64'h113);
        e = '0;
        if (t % 3 == 1) begin
          // burst of len <= 8: first and last bit of the burst in error
          len = 1 + int'($urandom_range(0, 7));
          if (len > n) len = n;
          e = {$urandom, $urandom} & ((64'd1 << len) - 64'd1);
          e[0] = 1'b1; e[len-1] = 1'b1;
          pos = int'($urandom_range(0, n - len));
          e = e << pos;
        end else if (t % 3 == 2) begin
          e = {$urandom, $urandom} & ((64'd1 << n) - 64'd1);
        end
        send(frame ^ e, n, 1'b0, 1'b1);
        check(64'(done8), 1, $sformatf("random %0d done", t));
        check(64'(rem8), ref_mod(frame ^ e, n, 8, 64'h113), $sformatf("random %0d remainder", t));
        check(64'(err8), 64'(ref_mod(e, n, 8, 64'h113) != 0), $sformatf("random %0d error flag", t));
        if (t % 3 == 1) begin
          check(64'(err8), 1, $sformatf("random %0d burst of %0d caught", t, len));
          bursts_caught += int'(err8);
        end
        if (t % 3 == 2 && e != 0 && !err8) long_missed++;
      end else begin
        // CRC-16
        n = k + 16;
        frame = (msg << 16) | ref_crc(msg, k, 16, 64'h18005);
        e = (t % 3 == 0) ? '0 : (64'(($urandom | 1) & 16'hFFFF) << $urandom_range(0, k));
        send(frame ^ e, n, 1'b1, 1'b0);
        check(64'(done16), 1, $sformatf("crc16 %0d done", t));
        check(64'(rem16), ref_mod(frame ^ e, n, 16, 64'h18005), $sformatf("crc16 %0d remainder", t));
        check(64'(err16), 64'(e != 0), $sformatf("crc16 %0d burst <= 16 caught / clean passes", t));
      end
    end
    $display("bursts of at most 8 bits caught: %0d; longer random patterns missed: %0d",
             bursts_caught, long_missed);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
