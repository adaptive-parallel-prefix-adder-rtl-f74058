// adaptive_adder_fsm: adaptive parallel prefix adder with run-time topology
// selection.
//
// How long a carry ripples depends on the operands: it runs through every bit
// where P = A ^ B is one. The design classifies each addition by the run of
// ones in P from the LSB (SHORT, MEDIUM, LONG) and takes the result from the
// prefix adder suited to that class: Brent-Kung (small) for SHORT, Sklansky
// (balanced) for MEDIUM, Kogge-Stone (fastest) for LONG. All three adders
// work in parallel on the captured operands; a control FSM chooses which
// result is registered and raises the matching flag BA, SA or KA.
//
// Timing, one operation every three clock cycles after reset:
//   CHECK   A, B, cin are sampled (classified combinationally, captured into
//           the operand registers at the end of the cycle);
//   SHORT / MEDIUM / LONG
//           BA/SA/KA show the selection; the chosen adder's sum/cout are
//           registered at the end of the cycle;
//   OUTPUT  sum/cout carry the new result and valid is high.
// So inputs must be stable during the CHECK cycle, i.e. at the rising edge
// that ends it; the result appears two rising edges later and is held until
// the next one. BA/SA/KA stay set until the next selection. rst is
// synchronous and active high; it clears sum, cout and the flags (through
// IDLE, one cycle) before the first CHECK.
//
// The port names are the published ones; valid is an addition of this
// implementation, as are the operand capture and the three-cycle cadence.
module adaptive_adder_fsm
  import appa_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             BA,
  output logic             SA,
  output logic             KA,
  output logic             valid
);

  carry_class_t     cls;
  logic [WIDTH-1:0] p_unused;
  logic             capture, load, clear;

  logic [WIDTH-1:0] a_q, b_q;
  logic             cin_q;

  logic [WIDTH-1:0] bk_sum, sk_sum, ks_sum, sel_sum;
  logic             bk_cout, sk_cout, ks_cout, sel_cout;

  // Propagate generation and classification of the live inputs (CHECK).
  carry_classifier #(.WIDTH(WIDTH)) u_cls (
    .a(A), .b(B), .p(p_unused), .cls(cls)
  );

  appa_fsm u_fsm (
    .clk(clk), .rst(rst), .cls(cls),
    .capture(capture), .load(load), .valid(valid), .clear(clear),
    .ba(BA), .sa(SA), .ka(KA)
  );

  // Operand registers, loaded in CHECK.
  always_ff @(posedge clk) begin
    if (rst) begin
      a_q   <= '0;
      b_q   <= '0;
      cin_q <= 1'b0;
    end else if (capture) begin
      a_q   <= A;
      b_q   <= B;
      cin_q <= cin;
    end
  end

  // The three prefix adders, all working on the captured operands.
  brent_kung_adder  #(.WIDTH(WIDTH)) u_bk (.a(a_q), .b(b_q), .cin(cin_q), .sum(bk_sum), .cout(bk_cout));
  sklansky_adder    #(.WIDTH(WIDTH)) u_sk (.a(a_q), .b(b_q), .cin(cin_q), .sum(sk_sum), .cout(sk_cout));
  kogge_stone_adder #(.WIDTH(WIDTH)) u_ks (.a(a_q), .b(b_q), .cin(cin_q), .sum(ks_sum), .cout(ks_cout));

  topology_mux #(.WIDTH(WIDTH)) u_mux (
    .ba(BA), .sa(SA), .ka(KA),
    .bk_sum(bk_sum), .bk_cout(bk_cout),
    .sk_sum(sk_sum), .sk_cout(sk_cout),
    .ks_sum(ks_sum), .ks_cout(ks_cout),
    .sum(sel_sum), .cout(sel_cout)
  );

  // Result registers, loaded at the end of the select state.
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      sum  <= '0;
      cout <= 1'b0;
    end else if (load) begin
      sum  <= sel_sum;
      cout <= sel_cout;
    end
  end

endmodule
