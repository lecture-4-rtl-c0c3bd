// binary_tree_adder: radix-2 tree adder with a PG tree and a carry tree.
//
// Up the tree: bit generate/propagate (G = AB, P = A + B) are merged in pairs
// into 2-bit groups, those into 4-bit groups and so on to the whole word:
//   G2_i = G_(2i+1) + G_(2i) P_(2i+1),  P2_i = P_(2i+1) P_(2i).
// Only one group per tree node is formed, so a second tree is needed to hand
// the carries back down: a group's lower half gets the group's carry-in and
// its upper half gets  G(lower half) + P(lower half) * carry-in.
//   C_(2i+1) = G_(2i) + C_(2i) P_(2i),  C_(2i) = C_(i) of the level above.
// Sums are s_i = a_i ^ b_i ^ c_i.
//
// Parameters: N, a power of two. Interface: a, b, cin -> s, cout.
// Combinational.
module binary_tree_adder
  import adder_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int unsigned L = $clog2(N);

  // t[l][i]: group of 2**l bits starting at bit i * 2**l.
  // c[l][i]: carry into that group.
  pg_t  t [L+1][N];
  logic c [L+1][N];

  always_comb begin
    for (int l = 0; l <= L; l++)
      for (int i = 0; i < N; i++) begin
        t[l][i] = '0;
        c[l][i] = 1'b0;
      end
    for (int i = 0; i < N; i++) t[0][i] = pg_bit(a[i], b[i]);
    // PG tree
    for (int l = 1; l <= L; l++)
      for (int i = 0; i < (N >> l); i++)
        t[l][i] = pg_merge(t[l-1][2*i+1], t[l-1][2*i]);
    // carry tree
    c[L][0] = cin;
    for (int l = L - 1; l >= 0; l--)
      for (int i = 0; i < (N >> (l + 1)); i++) begin
        c[l][2*i]   = c[l+1][i];
        c[l][2*i+1] = t[l][2*i].g | (t[l][2*i].p & c[l+1][i]);
      end
    for (int i = 0; i < N; i++) s[i] = a[i] ^ b[i] ^ c[0][i];
    cout = t[L][0].g | (t[L][0].p & cin);
  end

  initial assert (N == (1 << L)) else $error("binary_tree_adder: N must be a power of two");

endmodule
