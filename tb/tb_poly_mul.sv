// tb_poly_mul: checks the serial polynomial multiplier.
//
// Each test feeds the coefficients of a(X), highest order first, followed by
// M zeros, and collects one output coefficient per input: the product
// coefficients, highest order first. Checked: (X^3 + 1)(X^3 + X + 1) =
// X^6 + X^4 + X + 1 worked by hand, random a(X) against the sum of shifted
// copies of b(X) for b(X) = X^3 + X + 1 (default) and X^8 + X^4 + X + 1,
// that the first product coefficient a_n*b_m appears in the same cycle as a_n,
// and that the registers are back at 0 after the M trailing zeros.
module tb_poly_mul;
  import crc_ref_pkg::*;

  logic clk;
  logic rst_n;
  int   checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic en, a_in, p3, p8;
  poly_mul dut3 (.clk, .rst_n, .shift_en(en), .in_bit(a_in), .out_bit(p3));
  poly_mul #(.M(8), .BPOLY(9'h113)) dut8 (.clk, .rst_n, .shift_en(en), .in_bit(a_in), .out_bit(p8));

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // feed n coefficients of a then 8 zeros; product_3/8 collect the outputs
  task automatic run(logic [63:0] a, int n, output logic [63:0] prod3, output logic [63:0] prod8);
    prod3 = '0; prod8 = '0;
    for (int i = n + 7; i >= 0; i--) begin
      en   = 1'b1;
      a_in = (i >= 8) ? a[i-8] : 1'b0;
      #1;
      if (i >= 5)  prod3 = {prod3[62:0], p3};   // n + 3 outputs
      prod8 = {prod8[62:0], p8};                 // n + 8 outputs
      @(posedge clk); #1;
    end
    en = 1'b0; a_in = 1'b0;
  endtask

  initial begin
    logic [63:0] pr3, pr8, a;
    int n;
    rst_n = 1'b0; en = 1'b0; a_in = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // first product coefficient is a_n*b_m, combinational with a_n
    a_in = 1'b1; #1;
    check(64'(p3), 1, "a_n*b_m visible with a_n");
    a_in = 1'b0;

    run(64'b1001, 4, pr3, pr8);
    check(pr3, 64'b1010011, "(X^3+1)(X^3+X+1)");
    check(pr8, ref_mul(64'b1001, 64'h113), "(X^3+1)(X^8+X^4+X+1)");
    #1 check(64'({p3, p8}), 0, "registers flushed to 0");

    for (int t = 0; t < 200; t++) begin
      n = 1 + int'($urandom_range(0, 40));
      a = {$urandom, $urandom} & ((64'd1 << n) - 64'd1);
      run(a, n, pr3, pr8);
      check(pr3, ref_mul(a, 64'b1011), $sformatf("random %0d b=X^3+X+1", t));
      check(pr8, ref_mul(a, 64'h113), $sformatf("random %0d b=X^8+X^4+X+1", t));
    end

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
