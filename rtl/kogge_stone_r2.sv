// kogge_stone_r2: radix-2 full prefix-tree (Kogge-Stone) adder.
//
// Instead of one group per tree node, every bit position gets the group
// reaching down to bit 0: level l merges the group ending at i with the one
// ending at i - 2**l, so after log2(N) levels position i holds G(i:0). No
// second tree is needed to send carries down, at the price of many nodes and
// long wires; each node is one P gate and one G gate. Carry into bit i is
// G(i-1:0); s_i = a_i ^ b_i ^ G(i-1:0).
//
// Parameters: N (any width). Interface: a, b -> s, cout (no carry in, as in
// the original drawing). Combinational.
module kogge_stone_r2
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

  pg_t t [L+1][N];  // t[l][i]: group ending at i, spanning up to 2**l bits

  always_comb begin
    for (int i = 0; i < N; i++) t[0][i] = pg_bit(a[i], b[i]);
    for (int l = 1; l <= L; l++)
      for (int i = 0; i < N; i++)
        if (i >= (1 << (l - 1))) t[l][i] = pg_merge(t[l-1][i], t[l-1][i - (1 << (l - 1))]);
        else                     t[l][i] = t[l-1][i];
    s[0] = a[0] ^ b[0];
    for (int i = 1; i < N; i++) s[i] = a[i] ^ b[i] ^ t[L][i-1].g;
    cout = t[L][N-1].g;
  end

endmodule
