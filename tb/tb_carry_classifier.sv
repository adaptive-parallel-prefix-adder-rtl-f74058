// tb_carry_classifier: self-checking testbench of the carry-chain classifier.
//
// The expected class is worked out a different way from the conditions in the
// design: count the run of ones in A ^ B from the LSB; 0 or 1 is SHORT, 2 is
// MEDIUM, 3 or more is LONG. The 4-bit default is checked over all 256 operand
// pairs, an 8-bit instance over 2000 random pairs; p is checked against A ^ B.
module tb_carry_classifier;
  import appa_pkg::*;
  logic [3:0] a4, b4, p4;
  logic [7:0] a8, b8, p8;
  carry_class_t cls4, cls8;
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};

  carry_classifier              dut4 (.a(a4), .b(b4), .p(p4), .cls(cls4));
  carry_classifier #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .p(p8), .cls(cls8));

  function automatic carry_class_t ref_class(logic [7:0] p);
    int run = 0;
    while (run < 8 && p[run]) run++;
    if (run <= 1) return CLS_SHORT;
    if (run == 2) return CLS_MEDIUM;
    return CLS_LONG;
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      #1;
      checks += 2;
      if (p4 !== (a4 ^ b4)) failures++;
      if (cls4 !== ref_class({4'b0, a4 ^ b4})) begin
        failures++;
        $display("FAIL w4 a=%b b=%b cls=%s", a4, b4, cls4.name());
      end
      seen[int'(cls4)]++;
    end
    for (int i = 0; i < 2000; i++) begin
      a8 = 8'($urandom); b8 = 8'($urandom);
      #1;
      checks += 2;
      if (p8 !== (a8 ^ b8)) failures++;
      if (cls8 !== ref_class(a8 ^ b8)) begin
        failures++;
        $display("FAIL w8 a=%b b=%b cls=%s", a8, b8, cls8.name());
      end
    end
    // Every class must have occurred in the exhaustive 4-bit sweep.
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (seen[c] == 0) failures++;
    end
    $display("4-bit sweep: SHORT=%0d MEDIUM=%0d LONG=%0d", seen[0], seen[1], seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
