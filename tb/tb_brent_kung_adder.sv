// tb_brent_kung_adder: self-checking testbench of the Brent-Kung prefix adder.
//
// Three instances: the 4-bit default and an 8-bit one are checked
// exhaustively over a, b and cin; a 16-bit one with 4000 random operand
// sets plus the all-ones carry chain. The expected {cout, sum} is the integer
// a + b + cin, computed here without any prefix logic. A watchdog ends the run
// with a failure if it has not finished in time.
module tb_brent_kung_adder;
  logic [3:0]  a4, b4, s4;   logic c4, co4;
  logic [7:0]  a8, b8, s8;   logic c8, co8;
  logic [15:0] a16, b16, s16; logic c16, co16;
  int checks = 0, failures = 0;

  brent_kung_adder                  dut4  (.a(a4),  .b(b4),  .cin(c4),  .sum(s4),  .cout(co4));
  brent_kung_adder #(.WIDTH(8))     dut8  (.a(a8),  .b(b8),  .cin(c8),  .sum(s8),  .cout(co8));
  brent_kung_adder #(.WIDTH(16))    dut16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));

  task automatic check16(input logic [15:0] a, input logic [15:0] b, input logic c);
    logic [16:0] exp;
    a16 = a; b16 = b; c16 = c;
    #1;
    exp = {1'b0, a} + {1'b0, b} + 17'(c);
    checks++;
    if ({co16, s16} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL w16 %h + %h + %b = %b_%h, expected %h", a, b, c, co16, s16, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 512; i++) begin
      {c4, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} !== 5'({1'b0, a4} + {1'b0, b4} + 5'(c4))) begin
        failures++;
        if (failures < 10) $display("FAIL w4 %h + %h + %b = %b_%h", a4, b4, c4, co4, s4);
      end
    end
    for (int i = 0; i < (1 << 17); i++) begin
      {c8, a8, b8} = 17'(i);
      #1;
      checks++;
      if ({co8, s8} !== 9'({1'b0, a8} + {1'b0, b8} + 9'(c8))) begin
        failures++;
        if (failures < 10) $display("FAIL w8 %h + %h + %b = %b_%h", a8, b8, c8, co8, s8);
      end
    end
    check16(16'hffff, 16'h0000, 1'b1);
    check16(16'hffff, 16'h0001, 1'b0);
    check16(16'h7fff, 16'h0001, 1'b1);
    for (int i = 0; i < 4000; i++) check16(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
