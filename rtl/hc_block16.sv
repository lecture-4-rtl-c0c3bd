// hc_block16: 16-bit carry-select block of the 64-bit adder.
//
// Four hc_block4 blocks. For each one the carry into it is worked out twice,
// once assuming the carry into this 16-bit block is 0 and once assuming 1,
// by a 4-bit lookahead over the 4-bit generates and propagates:
//   cin40_0 = 0                 cin41_0 = 1
//   cin4c_b = g4_(b-1) + p4_(b-1) cin4c_(b-1)   (written out flat)
// so the whole 16-bit sum exists for both carry-ins before the real carry
// cin16 arrives; cin16 only steers the final muxes in the 2-bit leaves.
// g16/p16 are the block's generate and propagate for the 64-bit level.
//
// Interface: a, b (16 bits), cin16 -> g16, p16, r (16 bits). Combinational.
// Follows the original 16-bit block equations; p16 is the AND of the four 4-bit
// propagates.
module hc_block16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin16,
  output logic        g16,
  output logic        p16,
  output logic [15:0] r
);

  logic [3:0] g4, p4;
  logic [3:0] cin4_0, cin4_1;

  always_comb begin
    cin4_0[0] = 1'b0;
    cin4_1[0] = 1'b1;
    cin4_0[1] = g4[0];
    cin4_1[1] = g4[0] | p4[0];
    cin4_0[2] = g4[1] | (p4[1] & g4[0]);
    cin4_1[2] = g4[1] | (p4[1] & (g4[0] | p4[0]));
    cin4_0[3] = g4[2] | (p4[2] & (g4[1] | (p4[1] & g4[0])));
    cin4_1[3] = g4[2] | (p4[2] & (g4[1] | (p4[1] & (g4[0] | p4[0]))));
    g16       = g4[3] | (p4[3] & (g4[2] | (p4[2] & (g4[1] | (p4[1] & g4[0])))));
    p16       = &p4;
  end

  for (genvar i = 0; i < 4; i++) begin : g_quad
    hc_block4 u_quad (
      .a     (a[4*i +: 4]),
      .b     (b[4*i +: 4]),
      .cin4_0(cin4_0[i]),
      .cin4_1(cin4_1[i]),
      .cin16 (cin16),
      .g4    (g4[i]),
      .p4    (p4[i]),
      .r     (r[4*i +: 4])
    );
  end

endmodule
