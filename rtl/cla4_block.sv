// cla4_block: radix-4 carry-lookahead block.
//
// Takes the generate/propagate of four adjacent bits or groups (index 0 the
// least significant) and the carry c0 into the lowest one. Going up the tree
// it reports the group terms G3:0, P3:0; coming down it turns c0 into the
// carries into positions 1..3:
//   C1 = G0 + P0 C0,  C2 = G1:0 + P1:0 C0,  C3 = G2:0 + P2:0 C0
// where G1:0, G2:0, P1:0, P2:0 are the prefix terms the block builds anyway.
// The same block serves every level of cla64_radix4.
//
// Interface: g, p (4 bits), c0 -> gg (G3:0), pg (P3:0), c (C3..C1).
// Combinational; the original is a domino gate, here it is logic.
module cla4_block
  import adder_pkg::*;
(
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       c0,
  output logic       gg,
  output logic       pg,
  output logic [3:1] c
);

  pg_t pre [4];  // pre[i] = group i:0

  // Group terms do not depend on c0, so they are kept apart from the
  // carry logic: the tree's upward and downward paths stay separate.
  assign pre[0] = '{g: g[0], p: p[0]};
  for (genvar i = 1; i < 4; i++) begin : g_pre
    assign pre[i] = pg_merge('{g: g[i], p: p[i]}, pre[i-1]);
  end
  for (genvar i = 1; i < 4; i++) begin : g_c
    assign c[i] = pre[i-1].g | (pre[i-1].p & c0);
  end
  assign gg = pre[3].g;
  assign pg = pre[3].p;

endmodule
