// hc_block2: 2-bit leaf of the 64-bit dual-level carry-select adder.
//
// From the two operand bits it forms the 2-bit propagate and generate
//   p2 = (a0+b0)(a1+b1),  g2 = a1 b1 + a0 b0 (a1+b1)
// and the four speculative sum bits for a carry into the pair of 0 and of 1.
// The result is picked in two mux levels: the carry into the pair is known
// only for each guess of the carry into the enclosing 16-bit block
// (cin2_0 if that carry is 0, cin2_1 if it is 1), so both candidate results
// are formed first and cin16, the real carry into the 16-bit block and the
// latest-arriving signal, chooses between them in the last mux.
//
// Interface: a, b (2 bits), cin2_0, cin2_1, cin16 -> g2, p2, r (2 bits).
// Purely combinational. The equations follow the original 2-bit block; the
// two-step result mux is written as three 2:1 selects.
module hc_block2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin2_0,
  input  logic       cin2_1,
  input  logic       cin16,
  output logic       g2,
  output logic       p2,
  output logic [1:0] r
);

  logic [1:0] sum0, sum1;  // sum bits for carry-in 0 / 1 into this pair
  logic [1:0] r0, r1;      // result if the 16-bit block's carry-in is 0 / 1

  always_comb begin
    p2      = (a[0] | b[0]) & (a[1] | b[1]);
    g2      = (a[1] & b[1]) | ((a[0] & b[0]) & (a[1] | b[1]));
    sum0[0] = a[0] ^ b[0];
    sum1[0] = ~(a[0] ^ b[0]);
    sum0[1] = a[1] ^ b[1] ^ (a[0] & b[0]);
    sum1[1] = a[1] ^ b[1] ^ (a[0] | b[0]);
    r0      = cin2_0 ? sum1 : sum0;
    r1      = cin2_1 ? sum1 : sum0;
    r       = cin16 ? r1 : r0;     // late select: cin16 arrives last
  end

endmodule
