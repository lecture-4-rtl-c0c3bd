// kogge_stone_r4: radix-4 full prefix-tree (Kogge-Stone) adder.
//
// Like the radix-2 tree, every bit position ends with the group reaching bit
// 0, but each node merges up to four groups, so 16 bits need two levels:
// level 1 gives each i the group (i:i-3), level 2 merges (i:i-3), (i-4:i-7),
// (i-8:i-11), (i-12:i-15). Fewer levels, more inputs per gate.
// s_i = a_i ^ b_i ^ G(i-1:0).
//
// Parameters: N (any width; levels = ceil(log4 N)). Interface: a, b -> s,
// cout. Combinational.
module kogge_stone_r4
  import adder_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int unsigned L = ($clog2(N) + 1) / 2;

  pg_t t [L+1][N];  // t[l][i]: group ending at i, spanning up to 4**l bits

  always_comb begin
    for (int i = 0; i < N; i++) t[0][i] = pg_bit(a[i], b[i]);
    for (int l = 1; l <= L; l++)
      for (int i = 0; i < N; i++) begin
        t[l][i] = t[l-1][i];
        for (int k = 1; k < 4; k++)
          if (i >= k * (1 << (2 * (l - 1))))
            t[l][i] = pg_merge(t[l][i], t[l-1][i - k * (1 << (2 * (l - 1)))]);
      end
    s[0] = a[0] ^ b[0];
    for (int i = 1; i < N; i++) s[i] = a[i] ^ b[i] ^ t[L][i-1].g;
    cout = t[L][N-1].g;
  end

endmodule
