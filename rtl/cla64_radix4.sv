// cla64_radix4: three-level radix-4 carry-lookahead adder.
//
// Level 0 has one cla4_block per 4 bits, level 1 one per 16 bits, level 2
// one per 64 bits. Group generate/propagate flow up: each block merges four
// terms from the level below (G3:0, G15:0, G63:0). Carries flow down: the top
// block turns C0 into C16, C32, C48; each level-1 block turns its carry into
// the three carries 4, 8, 12 above it; each level-0 block finishes C1..C3 of
// its four bits. The slowest path is
//   A,B -> G0 -> G3:0 -> G15:0 -> G47:0 -> C48 -> C60 -> C63 -> S63.
// Sum bits are s_i = a_i ^ b_i ^ c_i.
//
// Parameters: LEVELS (tree depth), N = 4**LEVELS bits; the default is the
// original 64-bit adder. Interface: a, b, cin (C0) -> s, cout (C_N).
// Combinational.
module cla64_radix4
  import adder_pkg::*;
#(
  parameter int unsigned LEVELS = 3,
  parameter int unsigned N      = 4 ** LEVELS
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  // Level l holds N / 4**l groups of 4**l bits each.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned NG = N / (4 ** l);
    logic [NG-1:0] g;   // group generate
    logic [NG-1:0] p;   // group propagate
    logic [NG-1:0] c;   // carry into the group
  end

  assign g_lvl[0].g = a & b;
  assign g_lvl[0].p = a | b;

  for (genvar l = 0; l < LEVELS; l++) begin : g_tree
    localparam int unsigned NBLK = N / (4 ** (l + 1));
    for (genvar j = 0; j < NBLK; j++) begin : g_blk
      cla4_block u_cla (
        .g (g_lvl[l].g[4*j +: 4]),
        .p (g_lvl[l].p[4*j +: 4]),
        .c0(g_lvl[l+1].c[j]),
        .gg(g_lvl[l+1].g[j]),
        .pg(g_lvl[l+1].p[j]),
        .c (g_lvl[l].c[4*j+1 +: 3])
      );
      assign g_lvl[l].c[4*j] = g_lvl[l+1].c[j];
    end
  end

  assign g_lvl[LEVELS].c[0] = cin;

  assign s    = a ^ b ^ g_lvl[0].c;
  assign cout = g_lvl[LEVELS].g[0] | (g_lvl[LEVELS].p[0] & cin);

endmodule
