// tb_carry_examples: the two carry-chain examples used to motivate the
// design, 00001111 + 00000001 and 10101010 + 01010101, run through an 8-bit
// instance of the adaptive adder (the examples are 8 bits wide; the default
// design is 4 bits).
//
// Checks the sum and carry-out against A + B + cin and the flag chosen by the
// classification conditions on P[2:0]. Note what those conditions give:
// 00001111 + 00000001 has P = 00001110, P0 = 0, hence SHORT (Brent-Kung),
// although the ripple from the generate at bit 0 is long; 10101010 + 01010101
// has P = 11111111, hence LONG (Kogge-Stone), although with cin = 0 no carry
// is ever generated. The design follows the conditions, and this testbench
// documents that behaviour. Each example is run with cin = 0 and cin = 1.
module tb_carry_examples;
  logic       clk = 1'b0, rst = 1'b1;
  logic [7:0] A = '0, B = '0, sum;
  logic       cin = 1'b0, cout, BA, SA, KA, valid;
  int checks = 0, failures = 0;

  adaptive_adder_fsm #(.WIDTH(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(input logic [7:0] a, input logic [7:0] b, input logic c,
                     input logic [2:0] exp_flags, input string name);
    logic [8:0] exp;
    // Wait for the CHECK state: it follows the cycle where valid is high, or IDLE.
    A = a; B = b; cin = c;
    @(posedge clk iff dut.u_fsm.capture);
    @(negedge clk);
    checks++;
    if ({BA, SA, KA} !== exp_flags) begin
      failures++;
      $display("FAIL %s: flags %b, expected %b", name, {BA, SA, KA}, exp_flags);
    end
    @(negedge clk);
    exp = {1'b0, a} + {1'b0, b} + 9'(c);
    checks += 2;
    if (!valid) failures++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL %s: result %b_%b, expected %b", name, cout, sum, exp);
    end
    $display("%s cin=%b: sum=%b cout=%b BA=%b SA=%b KA=%b", name, c, sum, cout, BA, SA, KA);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 2; c++) begin
      run(8'b0000_1111, 8'b0000_0001, 1'(c), 3'b100, "00001111+00000001");
      run(8'b1010_1010, 8'b0101_0101, 1'(c), 3'b001, "10101010+01010101");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
