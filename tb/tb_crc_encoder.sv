// tb_crc_encoder: checks the transmitter-side CRC generator.
//
//  - The worked example: message 101100100011 with g(X) = X^8 + X^4 + X + 1
//    must leave as 10110010001111111001 (message, then R(X) = 11111001), the
//    message bits on the cycles they are accepted, eight idle cycles while the
//    divider is flushed with zeros, then the eight check bits, the last one
//    marked: 12 + 2*8 = 28 cycles from first bit to ready again.
//  - Random messages of random length, with and without gaps in the input,
//    against schoolbook long division, for the default generator and CRC-16
//    (X^16 + X^15 + X^2 + 1) on 8-bit data words and longer blocks.
//  - Every sent frame, divided by g(X), leaves remainder 0.
module tb_crc_encoder;
  import crc_ref_pkg::*;

  logic clk;
  logic rst_n;
  int   checks = 0, failures = 0;
  int   cycle = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic in_valid8, in_ready8, in_bit8, in_last8, out_valid8, out_bit8, out_last8;
  logic in_valid16, in_ready16, in_bit16, in_last16, out_valid16, out_bit16, out_last16;

  crc_encoder dut8 (.clk, .rst_n, .in_valid(in_valid8), .in_ready(in_ready8),
    .in_bit(in_bit8), .in_last(in_last8), .out_valid(out_valid8),
    .out_bit(out_bit8), .out_last(out_last8));

  crc_encoder #(.M(16), .GPOLY(crc_pkg::CRC16_POLY)) dut16 (.clk, .rst_n,
    .in_valid(in_valid16), .in_ready(in_ready16), .in_bit(in_bit16),
    .in_last(in_last16), .out_valid(out_valid16), .out_bit(out_bit16),
    .out_last(out_last16));

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Collect what the 8-bit encoder puts on the line, frame by frame.
  logic [63:0] line8;  int nline8;  int last8_cycle;  int valid8_cycles[$];
  always @(posedge clk) if (rst_n && out_valid8) begin
    line8 <= {line8[62:0], out_bit8};
    nline8 <= nline8 + 1;
    valid8_cycles.push_back(cycle);
    if (out_last8) last8_cycle <= cycle;
  end
  logic [63:0] line16; int nline16;
  always @(posedge clk) if (rst_n && out_valid16) begin
    line16 <= {line16[62:0], out_bit16};
    nline16 <= nline16 + 1;
  end

  task automatic send8(logic [63:0] msg, int k, bit gaps);
    for (int i = k - 1; i >= 0; i--) begin
      while (gaps && $urandom_range(0, 2) == 0) begin
        in_valid8 = 1'b0; @(posedge clk); #1;
      end
      in_valid8 = 1'b1; in_bit8 = msg[i]; in_last8 = (i == 0);
      while (!in_ready8) begin @(posedge clk); #1; end
      @(posedge clk); #1;
    end
    in_valid8 = 1'b0; in_last8 = 1'b0;
  endtask

  task automatic send16(logic [63:0] msg, int k);
    for (int i = k - 1; i >= 0; i--) begin
      in_valid16 = 1'b1; in_bit16 = msg[i]; in_last16 = (i == 0);
      while (!in_ready16) begin @(posedge clk); #1; end
      @(posedge clk); #1;
    end
    in_valid16 = 1'b0; in_last16 = 1'b0;
  endtask

  task automatic wait_ready8();
    while (!in_ready8) begin @(posedge clk); #1; end
  endtask
  task automatic wait_ready16();
    while (!in_ready16) begin @(posedge clk); #1; end
  endtask

  initial begin
    logic [63:0] msg, frame;
    int k, c0;
    rst_n = 1'b0;
    {in_valid8, in_bit8, in_last8, in_valid16, in_bit16, in_last16} = '0;
    nline8 = 0; nline16 = 0; line8 = '0; line16 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(64'(in_ready8), 1, "ready after reset");

    // worked example
    c0 = cycle;
    send8(64'b101100100011, 12, 1'b0);
    wait_ready8();
    check(64'(nline8), 20, "example: 20 line bits");
    check(line8 & 64'hFFFFF, 64'b10110010001111111001, "example: F(X)");
    check(64'(cycle - c0), 28, "example: 28 cycles until ready again");
    for (int i = 0; i < 20; i++)
      check(64'(valid8_cycles[i] - c0), 64'((i < 12) ? i : i + 8), $sformatf("example: line bit %0d cycle", i));
    check(64'(last8_cycle - c0), 27, "example: last check bit marked");

    // random messages, 8-bit generator, back to back and with gaps
    for (int t = 0; t < 200; t++) begin
      k = 1 + int'($urandom_range(0, 47));
      msg = {$urandom, $urandom} & ((64'd1 << k) - 64'd1);
      nline8 = 0;
      send8(msg, k, t[0]);
      wait_ready8();
      frame = (msg << 8) | ref_crc(msg, k, 8, 64'h113);
      check(64'(nline8), 64'(k + 8), $sformatf("random %0d length", t));
      check(line8 & ((64'd1 << (k + 8)) - 64'd1), frame, $sformatf("random %0d frame", t));
      check(ref_mod(frame, k + 8, 8, 64'h113), 0, $sformatf("random %0d divisible", t));
    end

    // CRC-16: 8-bit data words and longer blocks
    for (int t = 0; t < 100; t++) begin
      k = (t < 50) ? 8 : 1 + int'($urandom_range(0, 47));
      msg = {$urandom, $urandom} & ((64'd1 << k) - 64'd1);
      nline16 = 0;
      send16(msg, k);
      wait_ready16();
      frame = (msg << 16) | ref_crc(msg, k, 16, 64'h18005);
      check(64'(nline16), 64'(k + 16), $sformatf("crc16 %0d length", t));
      check(line16 & ((64'd1 << (k + 16)) - 64'd1), frame, $sformatf("crc16 %0d frame", t));
    end

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
