// appa_pkg: types and functions shared by the adaptive parallel prefix adder.
//
// gp_t is one generate/propagate pair. prefix_op() is the prefix (black-cell)
// operator (Gk,Pk) o (Gj,Pj) = (Gk | Pk&Gj, Pk&Pj), with the more significant
// group on the left. carry_class_t names the three carry-chain classes and
// appa_state_t the states of the control FSM. classify() holds the class
// conditions on the three low propagate bits:
//   SHORT  = ~P0 | (P0 & ~P1)
//   MEDIUM =  P0 &  P1 & ~P2
//   LONG   =  P0 &  P1 &  P2
// The operator, the conditions and the state names follow the design as
// published; the enum encodings are this implementation's choice.
package appa_pkg;

  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  typedef enum logic [1:0] {
    CLS_SHORT  = 2'd0,
    CLS_MEDIUM = 2'd1,
    CLS_LONG   = 2'd2
  } carry_class_t;

  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,
    ST_CHECK  = 3'd1,
    ST_SHORT  = 3'd2,
    ST_MEDIUM = 3'd3,
    ST_LONG   = 3'd4,
    ST_OUTPUT = 3'd5
  } appa_state_t;

  // Prefix operator: hi is the more significant group, lo the less significant.
  function automatic gp_t prefix_op(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Carry-chain classification from the three least significant propagate bits.
  function automatic carry_class_t classify(logic [2:0] p);
    if (!p[0] || (p[0] && !p[1])) return CLS_SHORT;
    else if (p[0] && p[1] && !p[2]) return CLS_MEDIUM;
    else return CLS_LONG;
  endfunction

endpackage
