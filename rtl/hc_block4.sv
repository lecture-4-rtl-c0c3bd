// hc_block4: 4-bit block of the 64-bit dual-level carry-select adder.
//
// Two hc_block2 leaves. The lower pair takes the carries into this 4-bit
// block directly; the carry into the upper pair is computed for both guesses
// of the 16-bit block's carry-in:
//   cin2c_1 = g2_0 + p2_0 cin4c     (c = 0, 1)
// The block also reports its own generate and propagate for the 16-bit
// level: g4 = g2_1 + p2_1 g2_0, p4 = p2_0 p2_1.
//
// Interface: a, b (4 bits), cin4_0 / cin4_1 (carry into this block if the
// 16-bit block's carry-in is 0 / 1), cin16 -> g4, p4, r (4 bits).
// Combinational; follows the original 4-bit block equations.
module hc_block4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin4_0,
  input  logic       cin4_1,
  input  logic       cin16,
  output logic       g4,
  output logic       p4,
  output logic [3:0] r
);

  logic [1:0] g2, p2;
  logic [1:0] cin2_0, cin2_1;

  assign cin2_0[0] = cin4_0;
  assign cin2_1[0] = cin4_1;
  assign cin2_0[1] = g2[0] | (p2[0] & cin4_0);
  assign cin2_1[1] = g2[0] | (p2[0] & cin4_1);

  for (genvar i = 0; i < 2; i++) begin : g_pair
    hc_block2 u_pair (
      .a     (a[2*i +: 2]),
      .b     (b[2*i +: 2]),
      .cin2_0(cin2_0[i]),
      .cin2_1(cin2_1[i]),
      .cin16 (cin16),
      .g2    (g2[i]),
      .p2    (p2[i]),
      .r     (r[2*i +: 2])
    );
  end

  assign g4 = g2[1] | (p2[1] & g2[0]);
  assign p4 = p2[0] & p2[1];

endmodule
