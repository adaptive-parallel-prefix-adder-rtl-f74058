// tb_appa_fsm: self-checking testbench of the adaptive adder's control FSM.
//
// A random carry class is driven every cycle and reset is pulsed now and then.
// A reference model in this file tracks the expected state and selection flags
// cycle by cycle; after each rising edge the FSM's state, strobes
// (capture, load, valid, clear) and flags are compared with it. The run also
// checks the three-cycle spacing of back-to-back valid pulses and that every
// state was visited.
module tb_appa_fsm;
  import appa_pkg::*;
  logic clk = 0, rst = 1;
  carry_class_t cls = CLS_SHORT;
  logic capture, load, valid, clear, ba, sa, ka;
  appa_state_t state;
  assign state = dut.state_q;   // internal state, observed for checking
  int checks = 0, failures = 0, cycles = 0;
  int visits [6] = '{0, 0, 0, 0, 0, 0};
  int last_valid = -1;

  appa_fsm dut (.*);

  always #5 clk = ~clk;

  appa_state_t exp_state = ST_IDLE;
  logic [2:0]  exp_flags = 3'b000;   // {ba, sa, ka}

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s = %0d, expected %0d", cycles, what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      cls = carry_class_t'($urandom_range(2, 0));
      rst = ($urandom_range(49, 0) == 0);
    end
    // Every state must have been visited.
    for (int s = 0; s < 6; s++) expect_eq($sformatf("visits[%0d] > 0", s), int'(visits[s] > 0), 1);
    $display("visits IDLE=%0d CHECK=%0d SHORT=%0d MEDIUM=%0d LONG=%0d OUTPUT=%0d",
             visits[0], visits[1], visits[2], visits[3], visits[4], visits[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model, advanced on the same edge as the FSM.
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (rst) begin
      exp_state <= ST_IDLE;
      exp_flags <= 3'b000;
    end else begin
      case (exp_state)
        ST_IDLE:   begin exp_state <= ST_CHECK; exp_flags <= 3'b000; end
        ST_CHECK: begin
          case (cls)
            CLS_SHORT:  begin exp_state <= ST_SHORT;  exp_flags <= 3'b100; end
            CLS_MEDIUM: begin exp_state <= ST_MEDIUM; exp_flags <= 3'b010; end
            default:    begin exp_state <= ST_LONG;   exp_flags <= 3'b001; end
          endcase
        end
        ST_OUTPUT: exp_state <= ST_CHECK;
        default:   exp_state <= ST_OUTPUT;
      endcase
    end
  end

  // Compare in the middle of each high phase.
  always @(negedge clk) begin
    if (cycles > 1) begin
      expect_eq("state", int'(state), int'(exp_state));
      expect_eq("flags", int'({ba, sa, ka}), int'(exp_flags));
      expect_eq("capture", int'(capture), int'(exp_state == ST_CHECK));
      expect_eq("load", int'(load), int'(exp_state inside {ST_SHORT, ST_MEDIUM, ST_LONG}));
      expect_eq("valid", int'(valid), int'(exp_state == ST_OUTPUT));
      expect_eq("clear", int'(clear), int'(exp_state == ST_IDLE));
      visits[int'(state)]++;
      if (valid) begin
        // Back-to-back operations are three cycles apart unless a reset intervened.
        if (last_valid >= 0) expect_eq("cycles between results", cycles - last_valid, 3);
        last_valid = cycles;
      end
      if (state == ST_IDLE) last_valid = -1;
    end
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
