// topology_mux: picks the result of the adder the controller selected.
//
// The three prefix adders run in parallel on the same operands; this one-hot
// AND-OR multiplexer passes on the sum and carry-out of the adder whose flag
// is set: ba for Brent-Kung, sa for Sklansky, ka for Kogge-Stone. With no flag
// set the output is zero. The controller guarantees at most one flag and
// checks that rule with an assertion of its own (this block has no reset to
// qualify one with).
//
// Interface: the three flags and the three (sum, cout) pairs in; the chosen
// (sum, cout) out; combinational. The selection is as published; the AND-OR
// form and the zero default are this implementation's choice.
module topology_mux #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             ba,
  input  logic             sa,
  input  logic             ka,
  input  logic [WIDTH-1:0] bk_sum,
  input  logic             bk_cout,
  input  logic [WIDTH-1:0] sk_sum,
  input  logic             sk_cout,
  input  logic [WIDTH-1:0] ks_sum,
  input  logic             ks_cout,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  always_comb begin
    sum  = ({WIDTH{ba}} & bk_sum) | ({WIDTH{sa}} & sk_sum) | ({WIDTH{ka}} & ks_sum);
    cout = (ba & bk_cout) | (sa & sk_cout) | (ka & ks_cout);
  end

endmodule
