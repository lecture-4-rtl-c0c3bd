// han_carlson: radix-2 sparse prefix tree with sparseness 2 (Han-Carlson).
//
// The first row merges each odd bit with the even bit below it. A full
// radix-2 prefix tree then runs on the odd positions only (spans 2, 4, 8,
// ...), halving the nodes and wires of a Kogge-Stone tree. A last row
// recovers the missing even-position groups, one node each: G(i:0) for even
// i is bit i merged with G(i-1:0). That costs one extra level of delay.
// s_i = a_i ^ b_i ^ G(i-1:0).
//
// Parameters: N (even width). Interface: a, b -> s, cout. Combinational.
module han_carlson
  import adder_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int unsigned L = $clog2(N);

  pg_t bitpg [N];
  pg_t t [L+1][N];   // t[l][i]: state after row l
  pg_t pre [N];      // pre[i] = G/P(i:0)

  always_comb begin
    for (int i = 0; i < N; i++) bitpg[i] = pg_bit(a[i], b[i]);
    // row 1: odd bits take in their even neighbour
    for (int i = 0; i < N; i++)
      t[1][i] = (i % 2 == 1) ? pg_merge(bitpg[i], bitpg[i-1]) : bitpg[i];
    t[0] = bitpg;
    // rows 2..L: Kogge-Stone on odd positions, span 2**(l-1)
    for (int l = 2; l <= L; l++)
      for (int i = 0; i < N; i++)
        if (i % 2 == 1 && i >= (1 << (l - 1)))
          t[l][i] = pg_merge(t[l-1][i], t[l-1][i - (1 << (l - 1))]);
        else
          t[l][i] = t[l-1][i];
    // final row: even positions
    for (int i = 0; i < N; i++)
      pre[i] = (i % 2 == 0 && i > 0) ? pg_merge(bitpg[i], t[L][i-1]) : t[L][i];
    s[0] = a[0] ^ b[0];
    for (int i = 1; i < N; i++) s[i] = a[i] ^ b[i] ^ pre[i-1].g;
    cout = pre[N-1].g;
  end

endmodule
