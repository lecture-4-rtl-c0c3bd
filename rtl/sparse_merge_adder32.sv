// sparse_merge_adder32: sparse carry-merge tree with carry-select sums.
//
// Only every fourth carry is computed by the tree; the sums of each 4-bit
// slice are formed in advance for both values of its carry-in and a 4-bit
// 2:1 mux picks one when the carry arrives. The tree:
//   PG gen        bit generate/propagate of all 32 bits
//   carry merge 1 2-bit groups (2i+1 : 2i)
//   carry merge 2 4-bit groups (4k+3 : 4k)
//   merge 3..5    prefix over the eight 4-bit groups, spans 1, 2, 4 groups,
//                 giving G(4k+3 : 0), i.e. the carries C3, C7, ..., C27, Cout
// The sparse tree has fewer nodes and wires than a full one, less power and
// less input loading; the missing carries are recovered by the precomputed
// conditional sums rather than an extra ripple.
//
// Parameters: N (multiple of 4; 32 by default). Interface: a, b -> s, cout
// (no carry in). Combinational. The exact node placement of merges 3..5 is
// this design's choice: a minimum-depth (growing-fanout) tree on the groups.
module sparse_merge_adder32
  import adder_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int unsigned NQ = N / 4;
  localparam int unsigned LQ = $clog2(NQ);

  pg_t bitpg [N];
  pg_t pair  [N/2];
  pg_t quad  [LQ+1][NQ];   // quad[l][k]: after merge row 3+l-1
  logic [NQ-1:0] cq;       // carry into 4-bit slice k

  always_comb begin
    for (int i = 0; i < N; i++)      bitpg[i] = pg_bit(a[i], b[i]);
    for (int i = 0; i < N / 2; i++)  pair[i]  = pg_merge(bitpg[2*i+1], bitpg[2*i]);
    for (int k = 0; k < NQ; k++)     quad[0][k] = pg_merge(pair[2*k+1], pair[2*k]);
    for (int l = 1; l <= LQ; l++)
      for (int k = 0; k < NQ; k++)
        if ((k & (1 << (l - 1))) != 0)
          quad[l][k] = pg_merge(quad[l-1][k], quad[l-1][((k >> (l - 1)) << (l - 1)) - 1]);
        else
          quad[l][k] = quad[l-1][k];
    cq[0] = 1'b0;
    for (int k = 1; k < NQ; k++) cq[k] = quad[LQ][k-1].g;
    cout = quad[LQ][NQ-1].g;
  end

  // 4-bit conditional-sum slices with 2:1 output mux
  for (genvar k = 0; k < NQ; k++) begin : g_slice
    logic [3:0] sum0, sum1;
    logic [3:0] c0, c1;   // ripple carries for slice carry-in 0 / 1
    assign c0[0] = 1'b0;
    assign c1[0] = 1'b1;
    for (genvar i = 0; i < 4; i++) begin : g_bit
      assign sum0[i]  = a[4*k+i] ^ b[4*k+i] ^ c0[i];
      assign sum1[i]  = a[4*k+i] ^ b[4*k+i] ^ c1[i];
      if (i < 3) begin : g_c
        assign c0[i+1] = bitpg[4*k+i].g | (bitpg[4*k+i].p & c0[i]);
        assign c1[i+1] = bitpg[4*k+i].g | (bitpg[4*k+i].p & c1[i]);
      end
    end
    assign s[4*k +: 4] = cq[k] ? sum1 : sum0;
  end

endmodule
