// carry_classifier: propagate generation and carry-chain classification.
//
// P = A ^ B marks the bit positions through which an incoming carry would
// ripple. The length of the run of ones in P starting at the LSB estimates how
// far the carry travels, and the three low bits of P sort each operation into
// one class:
//   SHORT  = ~P0 | (P0 & ~P1)   run of 0 or 1
//   MEDIUM =  P0 &  P1 & ~P2    run of exactly 2
//   LONG   =  P0 &  P1 &  P2    run of 3 or more
// The conditions are the published ones; they cover every P and exclude each
// other, so exactly one class results.
//
// Interface: a, b in; p (the propagate vector) and cls out; combinational.
// Only P[2:0] is examined, so WIDTH must be at least 3.
module carry_classifier
  import appa_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] p,
  output carry_class_t     cls
);

  assign p   = a ^ b;
  assign cls = classify(p[2:0]);

endmodule
