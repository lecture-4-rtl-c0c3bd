// hc_adder64: 64-bit dual-level carry-select adder.
//
// A logarithmic adder sends generate/propagate up a tree and carries back
// down. This one shortens the trip down: the 64-bit level only finds the
// carry into each of four 16-bit blocks,
//   cin16_0 = 0, cin16_1 = g16_0, cin16_2 = g16_1 + p16_1 g16_0,
//   cin16_3 = g16_2 + p16_2 (g16_1 + p16_1 g16_0)
// (the generate loop below writes the same terms as a recurrence, so N may be any
// multiple of 16)
// while each 16-bit block has meanwhile formed its sum for both possible
// carry-ins, itself a carry-select adder of 4-bit and 2-bit blocks sharing
// the same generate/propagate logic (hc_block16, hc_block4, hc_block2).
//
// Interface: a, b (64 bits) -> r = (a + b) mod 2^64. There is no carry in
// (the carry into bit 0 is 0) and no carry out, as in the original design;
// subtraction would invert b outside this adder. Combinational. The top
// block's g16/p16 therefore go unused (lint reports them as unused bits).
module hc_adder64 #(
  parameter int unsigned N = 64  // a multiple of 16; the original adder has four blocks
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] r
);

  localparam int unsigned NB = N / 16;

  logic [NB-1:0] g16, p16, cin16;

  assign cin16[0] = 1'b0;
  for (genvar i = 1; i < NB; i++) begin : g_cin
    assign cin16[i] = g16[i-1] | (p16[i-1] & cin16[i-1]);
  end

  for (genvar i = 0; i < NB; i++) begin : g_blk
    hc_block16 u_blk (
      .a    (a[16*i +: 16]),
      .b    (b[16*i +: 16]),
      .cin16(cin16[i]),
      .g16  (g16[i]),
      .p16  (p16[i]),
      .r    (r[16*i +: 16])
    );
  end

  initial assert (N % 16 == 0 && N >= 16) else $error("hc_adder64: N must be a multiple of 16");

endmodule
