// sklansky_adder: WIDTH-bit Sklansky parallel prefix adder, purely combinational.
//
// Three phases. Pre-processing forms G_i = A_i & B_i and P_i = A_i ^ B_i for
// every bit; the carry-in is folded into bit 0 (G_0 := G_0 | P_0 & cin), so
// each group generate G[i:0] that leaves the tree is already the carry into
// bit i+1. Prefix computation combines (G,P) pairs with the prefix operator of
// appa_pkg over NLEVELS levels:
//   level k (block 2^k): in each block the upper half combines with the top
//   position of the lower half, i.e. position i with bit k-1 set combines
//   with ((i >> (k-1)) << (k-1)) - 1.
// That is log2(WIDTH) levels and the fewest cells for that depth, at the cost
// of fan-out growing to WIDTH/2 at the last level.
// Post-processing gives S_i = P_i ^ C_i with C_0 = cin, and cout = C_WIDTH.
//
// Interface: a, b, cin in; sum, cout out; no clock, one combinational path.
// WIDTH must be a power of two, at least 2. The published design uses 4-bit
// adders (the default); the tree is written for any power of two, and the
// handling of cin is this implementation's choice.
module sklansky_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  import appa_pkg::*;

  localparam int unsigned LOGW    = $clog2(WIDTH);
  localparam int unsigned NLEVELS = LOGW;

  // Partner of position i at level k (1-based): the less significant group it
  // is combined with, or -1 when the pair passes through unchanged.
  function automatic int partner(int k, int i);
    if (((i >> (k - 1)) & 1) != 0) return ((i >> (k - 1)) << (k - 1)) - 1;
    return -1;
  endfunction

  logic [WIDTH-1:0] p;
  gp_t              pre [WIDTH];   // level 0
  gp_t              fin [WIDTH];   // last level: fin[i].g = C(i+1)
  logic [WIDTH:0]   c;

  // Pre-processing.
  assign p = a ^ b;
  for (genvar i = 0; i < WIDTH; i++) begin : g_pre
    if (i == 0) begin : g_b0
      assign pre[i].g = (a[0] & b[0]) | (p[0] & cin);
    end else begin : g_bi
      assign pre[i].g = a[i] & b[i];
    end
    assign pre[i].p = p[i];
  end

  // Prefix tree: each level keeps its own pairs in lvl, read by the next one.
  for (genvar k = 1; k <= NLEVELS; k++) begin : g_lvl
    gp_t prv [WIDTH];
    gp_t lvl [WIDTH];
    if (k == 1) begin : g_first
      assign prv = pre;
    end else begin : g_next
      assign prv = g_lvl[k-1].lvl;
    end
    for (genvar i = 0; i < WIDTH; i++) begin : g_pos
      localparam int J = partner(k, i);
      if (J >= 0) begin : g_cell
        assign lvl[i] = prefix_op(prv[i], prv[J]);
      end else begin : g_buf
        assign lvl[i] = prv[i];
      end
    end
  end
  assign fin = g_lvl[NLEVELS].lvl;

  // Post-processing.
  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_post
    assign c[i+1] = fin[i].g;
  end
  assign sum  = p ^ c[WIDTH-1:0];
  assign cout = c[WIDTH];

endmodule
