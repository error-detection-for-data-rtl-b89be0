// tb_mod2_stage: checks one modulo-2 shift-register stage with the constant
// multiplier set to 1 (an adder in front of the flip-flop) and set to 0 (a
// plain delay), against the truth table of XOR, under random inputs, random
// shift enables and a reset in the middle.
module tb_mod2_stage;
  logic clk = 1'b0;
  logic rst_n;
  logic shift_en, d_in, tap_in;
  logic q1, q0;
  logic exp1, exp0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  mod2_stage #(.TAP(1'b1)) dut1 (.clk, .rst_n, .shift_en, .d_in, .tap_in, .q(q1));
  mod2_stage #(.TAP(1'b0)) dut0 (.clk, .rst_n, .shift_en, .d_in, .tap_in, .q(q0));

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; shift_en = 1'b0; d_in = 1'b0; tap_in = 1'b0;
    @(posedge clk); @(posedge clk); #1;
    rst_n = 1'b1;
    check(q1, 1'b0, "reset tap=1");
    check(q0, 1'b0, "reset tap=0");
    exp1 = 1'b0; exp0 = 1'b0;
    for (int i = 0; i < 400; i++) begin
      shift_en = 1'($urandom);
      d_in     = 1'($urandom);
      tap_in   = 1'($urandom);
      if (i == 200) rst_n = 1'b0;
      @(posedge clk);
      if (!rst_n)        begin exp1 = 1'b0; exp0 = 1'b0; end
      else if (shift_en) begin
        // modulo-2 addition table: 0+0=0, 0+1=1, 1+0=1, 1+1=0
        exp1 = (d_in != tap_in);
        exp0 = d_in;
      end
      #1;
      rst_n = 1'b1;
      check(q1, exp1, $sformatf("step %0d tap=1", i));
      check(q0, exp0, $sformatf("step %0d tap=0", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
