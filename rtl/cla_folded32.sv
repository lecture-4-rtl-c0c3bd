// cla_folded32: 32-bit two-level carry-lookahead adder drawn as a folded tree.
//
// Eight 4-bit lookahead blocks sit over the bits and produce each block's
// G, P and, once its carry-in is known, the carries into its bits. Two
// super-blocks, one per 16-bit half, merge four block terms each into G*, P*
// and return the carries into their 4-bit blocks (C4, C8, C12 and C20, C24,
// C28). A final group joins the halves: C16 = G15:0 + P15:0 Cin and
// Cout = G31:16 + P31:16 C16. The two halves mirror each other around that
// final group, which is the fold. Its slowest path is about 12 gate delays:
// one for g/p, 2 x 2 for G/P up, 3 x 2 for carries down and one XOR.
//
// Interface: a, b (32 bits), cin -> s, cout. Combinational. Built from the
// same cla4_block as the 64-bit radix-4 adder.
module cla_folded32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  output logic [31:0] s,
  output logic        cout
);

  logic [31:0] g, p, c;    // bit generate, propagate, carry into bit
  logic [7:0]  gb, pb, cb; // 4-bit block terms and carry into each block
  logic [1:0]  gs, ps, cs; // 16-bit super-block terms and carry into each

  assign g = a & b;
  assign p = a | b;

  for (genvar j = 0; j < 8; j++) begin : g_blk
    cla4_block u_blk (
      .g (g[4*j +: 4]),
      .p (p[4*j +: 4]),
      .c0(cb[j]),
      .gg(gb[j]),
      .pg(pb[j]),
      .c (c[4*j+1 +: 3])
    );
    assign c[4*j] = cb[j];
  end

  for (genvar h = 0; h < 2; h++) begin : g_super
    cla4_block u_super (
      .g (gb[4*h +: 4]),
      .p (pb[4*h +: 4]),
      .c0(cs[h]),
      .gg(gs[h]),
      .pg(ps[h]),
      .c (cb[4*h+1 +: 3])
    );
    assign cb[4*h] = cs[h];
  end

  // final group: C16 and Cout
  assign cs[0] = cin;
  assign cs[1] = gs[0] | (ps[0] & cin);
  assign cout  = gs[1] | (ps[1] & cs[1]);

  assign s = a ^ b ^ c;

endmodule
