// tb_poly_div: checks the serial polynomial divider.
//
//  1. X^6 + X^3 divided by X^3 + X + 1, clock by clock: register contents and
//     output line after each pulse, and the remainder X^2 + X.
//  2. The 8-bit worked example, g(X) = X^8 + X^4 + X + 1, clock by clock for
//     three dividends: the prescaled message 101100100011 followed by eight
//     zeros (remainder 11111001), the code message received without error
//     (remainder 0), and the code message with an 8-bit burst (remainder
//     X^7+X^5+X^4+X^3+X^2, stages 0..7 = 00111101).
//  3. Random dividends for the 8-bit generator and for CRC-16
//     (X^16 + X^15 + X^2 + 1), remainders against schoolbook long division,
//     dividends following each other with start and no idle cycle, and with
//     random idle cycles (shift_en low) inside them.
module tb_poly_div;
  import crc_ref_pkg::*;

  logic clk;
  logic rst_n;
  int   checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  // degree-3 divider
  logic        s3_shift, s3_start, s3_in, s3_quot;
  logic [2:0]  s3_rem;
  poly_div #(.M(3), .GPOLY(3'b011)) dut3 (.clk, .rst_n, .shift_en(s3_shift),
    .start(s3_start), .in_bit(s3_in), .quot(s3_quot), .rem(s3_rem));

  // default divider: X^8 + X^4 + X + 1
  logic        s8_shift, s8_start, s8_in, s8_quot;
  logic [7:0]  s8_rem;
  poly_div dut8 (.clk, .rst_n, .shift_en(s8_shift), .start(s8_start),
    .in_bit(s8_in), .quot(s8_quot), .rem(s8_rem));

  // CRC-16 divider
  logic        s16_shift, s16_start, s16_in, s16_quot;
  logic [15:0] s16_rem;
  poly_div #(.M(16), .GPOLY(crc_pkg::CRC16_POLY)) dut16 (.clk, .rst_n,
    .shift_en(s16_shift), .start(s16_start), .in_bit(s16_in), .quot(s16_quot),
    .rem(s16_rem));

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Feed a dividend to the 8-bit divider, comparing each step with a table.
  task automatic table8(string din, string regs[], string outs, string name);
    for (int i = 0; i < din.len(); i++) begin
      s8_shift = 1'b1;
      s8_start = (i == 0);
      s8_in    = (din[i] == "1");
      @(posedge clk); #1;
      s8_shift = 1'b0; s8_start = 1'b0;
      check(64'(s8_rem), stage_vec(regs[i]), $sformatf("%s pulse %0d register", name, i + 1));
      check(64'(s8_quot), 64'(outs[i] == "1"), $sformatf("%s pulse %0d output", name, i + 1));
    end
  endtask

  initial begin
    string t51_regs[];
    string t61_regs[], t62_regs[], t63_regs[];
    string d51, q51;
    logic [63:0] dividend;
    int n;

    rst_n = 1'b0;
    {s3_shift, s3_start, s3_in, s8_shift, s8_start, s8_in, s16_shift, s16_start, s16_in} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(64'(s3_rem), 0, "reset deg3");
    check(64'(s8_rem), 0, "reset deg8");

    // 1. X^6 + X^3 by X^3 + X + 1 (quotient X^3 + X)
    d51 = "1001000";
    q51 = "0010100";
    t51_regs = '{"100", "010", "001", "010", "001", "110", "011"};
    for (int i = 0; i < 7; i++) begin
      s3_shift = 1'b1;
      s3_start = 1'b0;
      s3_in    = (d51[i] == "1");
      @(posedge clk); #1;
      s3_shift = 1'b0;
      check(64'(s3_rem), stage_vec(t51_regs[i]), $sformatf("deg3 pulse %0d register", i + 1));
      // quotient X^3 + X leaves on pulses 3..6 as 1,0,1,0
      if (i >= 2 && i <= 5) check(64'(s3_quot), 64'(q51[i] == "1"), $sformatf("deg3 pulse %0d quotient", i + 1));
    end
    check(64'(s3_rem), 64'b110, "deg3 remainder X^2+X");
    check(64'(s3_rem), ref_mod(64'b1001000, 7, 3, 64'b1011), "deg3 remainder vs long division");

    // 2. worked example with X^8 + X^4 + X + 1
    t61_regs = '{"10000000","01000000","10100000","11010000","01101000","00110100",
                 "10011010","01001101","11101110","01110111","01110011","01110001",
                 "11110000","01111000","00111100","00011110","00001111","11001111",
                 "10101111","10011111"};
    table8("10110010001100000000", t61_regs, "00000001011100001111", "encode");
    check(64'(s8_rem), 64'b11111001, "encode remainder R(X)");

    t62_regs = '{"10000000","01000000","10100000","11010000","01101000","00110100",
                 "10011010","01001101","11101110","01110111","01110011","01110001",
                 "01110000","10111000","11011100","11101110","11110111","10110011",
                 "10010001","00000000"};
    table8("10110010001111111001", t62_regs, "00000001011100001110", "no-error");
    check(64'(s8_rem), 0, "no-error remainder 0");

    t63_regs = '{"10000000","11000000","01100000","00110000","00011000","00001100",
                 "00000110","00000011","01001001","11101100","11110110","11111011",
                 "00110101","01010010","10101001","00011100","10001110","01000111",
                 "11101011","00111101"};
    table8("11000000101111111001", t63_regs, "00000001100110100111", "burst");
    check(64'(s8_rem), stage_vec("00111101"), "burst remainder");
    check(64'(s8_rem != 0), 1, "burst detected");

    // 3. random dividends, back to back, with idle cycles
    for (int t = 0; t < 300; t++) begin
      n = 9 + int'($urandom_range(0, 54));
      dividend = {$urandom, $urandom} & ((64'd1 << n) - 64'd1);
      for (int i = n - 1; i >= 0; i--) begin
        while ((t % 3 == 2) && ($urandom_range(0, 3) == 0)) begin
          s8_shift = 1'b0; s16_shift = 1'b0;
          @(posedge clk); #1;
        end
        s8_shift  = 1'b1;          s16_shift = (n >= 17);
        s8_start  = (i == n - 1);  s16_start = (i == n - 1);
        s8_in     = dividend[i];   s16_in    = dividend[i];
        @(posedge clk); #1;
      end
      check(64'(s8_rem), ref_mod(dividend, n, 8, 64'h113), $sformatf("random %0d crc8", t));
      if (n >= 17)
        check(64'(s16_rem), ref_mod(dividend, n, 16, 64'h18005), $sformatf("random %0d crc16", t));
    end
    s8_shift = 1'b0; s16_shift = 1'b0;

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
