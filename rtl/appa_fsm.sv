// appa_fsm: control FSM of the adaptive adder.
//
// States (as published): IDLE initialises the outputs, CHECK evaluates the
// carry class, SHORT / MEDIUM / LONG select Brent-Kung / Sklansky /
// Kogge-Stone, OUTPUT presents the result. One operation runs
//   CHECK -> SHORT|MEDIUM|LONG -> OUTPUT -> CHECK -> ...
// three cycles per operation, back to back. Reset (synchronous, active high)
// goes to IDLE, which moves on to CHECK on the next cycle: there is no start
// input, so the unconditional IDLE -> CHECK and OUTPUT -> CHECK steps are this
// implementation's choice.
//
// Outputs, all functions of the registered state except the flags:
//   capture  high in CHECK: the datapath registers the operands;
//   load     high in SHORT/MEDIUM/LONG: the datapath registers the result;
//   valid    high in OUTPUT: a new result is on the outputs;
//   clear    high in IDLE: the datapath clears its result;
//   ba/sa/ka registered one-hot selection flags, set on entry to
//            SHORT/MEDIUM/LONG (the edge that leaves CHECK) and held until
//            the next selection, cleared by reset and in IDLE.
module appa_fsm
  import appa_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  carry_class_t cls,
  output logic         capture,
  output logic         load,
  output logic         valid,
  output logic         clear,
  output logic         ba,
  output logic         sa,
  output logic         ka
);

  appa_state_t state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_IDLE:  state_d = ST_CHECK;
      ST_CHECK: begin
        unique case (cls)
          CLS_SHORT:  state_d = ST_SHORT;
          CLS_MEDIUM: state_d = ST_MEDIUM;
          default:    state_d = ST_LONG;
        endcase
      end
      ST_SHORT, ST_MEDIUM, ST_LONG: state_d = ST_OUTPUT;
      ST_OUTPUT: state_d = ST_CHECK;
      default:   state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= ST_IDLE;
      ba      <= 1'b0;
      sa      <= 1'b0;
      ka      <= 1'b0;
    end else begin
      state_q <= state_d;
      if (state_q == ST_IDLE) begin
        ba <= 1'b0;
        sa <= 1'b0;
        ka <= 1'b0;
      end else if (state_q == ST_CHECK) begin
        ba <= (state_d == ST_SHORT);
        sa <= (state_d == ST_MEDIUM);
        ka <= (state_d == ST_LONG);
      end
    end
  end

  assign capture = (state_q == ST_CHECK);
  assign load    = (state_q == ST_SHORT) || (state_q == ST_MEDIUM) || (state_q == ST_LONG);
  assign valid   = (state_q == ST_OUTPUT);
  assign clear   = (state_q == ST_IDLE);

  // At most one adder is ever selected.
  assert property (@(posedge clk) disable iff (rst) $onehot0({ba, sa, ka}))
    else $error("appa_fsm: selection flags not one-hot");
  // In a select state the matching flag is the one that is set.
  assert property (@(posedge clk) disable iff (rst)
                   (state_q == ST_SHORT)  |-> ba)
    else $error("appa_fsm: SHORT without BA");
  assert property (@(posedge clk) disable iff (rst)
                   (state_q == ST_MEDIUM) |-> sa)
    else $error("appa_fsm: MEDIUM without SA");
  assert property (@(posedge clk) disable iff (rst)
                   (state_q == ST_LONG)   |-> ka)
    else $error("appa_fsm: LONG without KA");

endmodule
