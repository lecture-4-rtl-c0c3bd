// ladner_fischer: minimum-depth prefix tree with growing fanout.
//
// Row l (l = 1..log2 N) splits the word into blocks of 2**l bits; every
// position in the upper half of a block merges with the group that ends at
// the top of the lower half. After the last row each position holds G(i:0).
// Depth is log2 N with few nodes, but the node at the top of a lower half
// drives 2**(l-1) nodes: the fanout doubles each row (1, 2, 4, 8 for 16
// bits). s_i = a_i ^ b_i ^ G(i-1:0).
//
// Parameters: N (any width). Interface: a, b -> s, cout. Combinational.
module ladner_fischer
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

  pg_t t [L+1][N];

  always_comb begin
    for (int i = 0; i < N; i++) t[0][i] = pg_bit(a[i], b[i]);
    for (int l = 1; l <= L; l++)
      for (int i = 0; i < N; i++)
        if ((i & (1 << (l - 1))) != 0)
          // top of the lower half of this block: (i with bits below l-1
          // cleared) - 1
          t[l][i] = pg_merge(t[l-1][i], t[l-1][((i >> (l - 1)) << (l - 1)) - 1]);
        else
          t[l][i] = t[l-1][i];
    s[0] = a[0] ^ b[0];
    for (int i = 1; i < N; i++) s[i] = a[i] ^ b[i] ^ t[L][i-1].g;
    cout = t[L][N-1].g;
  end

endmodule
