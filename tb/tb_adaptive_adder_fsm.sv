// tb_adaptive_adder_fsm: end-to-end testbench of the adaptive adder at its
// default 4-bit size (no parameter override).
//
// Runs every one of the 512 combinations of A, B and cin as one operation,
// then 300 random ones, then resets in the middle of an operation and runs
// 30 more. Operations are issued at the design's fixed cadence: the operand
// is put on A/B/cin for the CHECK cycle, and in the two following cycles the
// inputs are replaced by random junk, which the design must ignore because it
// captured the operand. For each operation it checks
//   - one cycle after capture: exactly the expected flag of BA/SA/KA, where
//     the expected class comes from the run of ones in A ^ B from the LSB
//     (0-1 SHORT, 2 MEDIUM, 3+ LONG), and valid low;
//   - two cycles after capture (the latency): valid high, {cout, sum} equal
//     to A + B + cin, flags unchanged;
//   - after reset: sum, cout and all flags zero, valid low.
// It counts how often each mechanism happened: SHORT/Brent-Kung,
// MEDIUM/Sklansky and LONG/Kogge-Stone selections, inputs changing during an
// operation, and a reset during an operation; one that never happened counts
// as a failure.
module tb_adaptive_adder_fsm;
  logic       clk = 1'b0, rst = 1'b1;
  logic [3:0] A = '0, B = '0, sum;
  logic       cin = 1'b0, cout, BA, SA, KA, valid;
  int checks = 0, failures = 0;
  int n_short = 0, n_medium = 0, n_long = 0, n_junk = 0, n_reset = 0, n_ops = 0;

  adaptive_adder_fsm dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL op %0d: %s = %0d, expected %0d", n_ops, what, got, exp);
    end
  endtask

  function automatic logic [2:0] ref_flags(logic [3:0] a, logic [3:0] b);
    logic [3:0] p = a ^ b;
    int run = 0;
    while (run < 4 && p[run]) run++;
    if (run <= 1) return 3'b100;       // BA
    if (run == 2) return 3'b010;       // SA
    return 3'b001;                     // KA
  endfunction

  // One operation. Called at a falling edge just before the CHECK cycle's
  // rising edge (the design is then in CHECK), returns at the falling edge
  // that follows the OUTPUT cycle's rising edge... i.e. again in CHECK.
  task automatic do_op(input logic [3:0] a, input logic [3:0] b, input logic c);
    logic [2:0] f;
    logic [4:0] exp;
    A = a; B = b; cin = c;
    f = ref_flags(a, b);
    exp = 5'({1'b0, a} + {1'b0, b} + 5'(c));
    @(negedge clk);                                  // select state
    expect_eq("flags", int'({BA, SA, KA}), int'(f));
    expect_eq("valid in select", int'(valid), 0);
    if (f == 3'b100) n_short++;
    if (f == 3'b010) n_medium++;
    if (f == 3'b001) n_long++;
    {A, B, cin} = 9'($urandom);                      // junk, must be ignored
    if ({A, B, cin} != {a, b, c}) n_junk++;
    @(negedge clk);                                  // OUTPUT state
    expect_eq("valid", int'(valid), 1);
    expect_eq("result", int'({cout, sum}), int'(exp));
    expect_eq("flags held", int'({BA, SA, KA}), int'(f));
    {A, B, cin} = 9'($urandom);
    @(negedge clk);                                  // back in CHECK
    expect_eq("valid after output", int'(valid), 0);
    n_ops++;
  endtask

  task automatic reset_and_start();
    rst = 1'b1;
    @(negedge clk);
    @(negedge clk);
    expect_eq("sum/cout after reset", int'({cout, sum}), 0);
    expect_eq("flags after reset", int'({BA, SA, KA}), 0);
    expect_eq("valid after reset", int'(valid), 0);
    rst = 1'b0;
    @(negedge clk);                                  // IDLE -> CHECK edge passed
    expect_eq("sum/cout after IDLE", int'({cout, sum}), 0);
    expect_eq("flags after IDLE", int'({BA, SA, KA}), 0);
  endtask

  initial begin
    @(negedge clk);
    reset_and_start();
    for (int i = 0; i < 512; i++) do_op(i[3:0], i[7:4], i[8]);
    for (int i = 0; i < 300; i++) do_op(4'($urandom), 4'($urandom), 1'($urandom));
    // Reset in the middle of an operation: issue an operand, reset while it
    // is in its select state, and check that nothing of it comes out.
    A = 4'hf; B = 4'h0; cin = 1'b1;
    @(negedge clk);
    n_reset++;
    reset_and_start();
    for (int i = 0; i < 30; i++) do_op(4'($urandom), 4'($urandom), 1'($urandom));

    expect_eq("SHORT selections seen", int'(n_short > 0), 1);
    expect_eq("MEDIUM selections seen", int'(n_medium > 0), 1);
    expect_eq("LONG selections seen", int'(n_long > 0), 1);
    expect_eq("inputs changed mid-operation", int'(n_junk > 0), 1);
    expect_eq("reset mid-operation", int'(n_reset > 0), 1);
    $display("operations=%0d SHORT/BA=%0d MEDIUM/SA=%0d LONG/KA=%0d input-changes=%0d resets=%0d",
             n_ops, n_short, n_medium, n_long, n_junk, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
