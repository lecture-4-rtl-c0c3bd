// carry_select_adder: carry-select adder.
//
// Each K-bit group sets up its bit generates and propagates, then runs two
// carry chains side by side, one assuming a carry-in of 0 and one of 1. When
// the real carry into the group arrives it only selects between the two
// precomputed carry vectors (and the group's carry out), so the final ripple
// inside a group is gone; the sums are then p ^ carry. The carry between
// groups passes through one multiplexer per group.
//
// Parameters: N (width), K (group size, N a multiple of K).
// Interface: a, b, cin -> s, cout. Combinational.
module carry_select_adder #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int unsigned NG = N / K;

  logic [NG:0]  cg;
  logic [N-1:0] p, g;

  assign p     = a ^ b;
  assign g     = a & b;
  assign cg[0] = cin;

  for (genvar j = 0; j < NG; j++) begin : g_grp
    logic [K:0] c0, c1;   // carry chains for carry-in 0 and 1
    logic [K:0] c;        // selected carry vector
    assign c0[0] = 1'b0;
    assign c1[0] = 1'b1;
    for (genvar i = 0; i < K; i++) begin : g_bit
      assign c0[i+1] = g[j*K+i] | (p[j*K+i] & c0[i]);
      assign c1[i+1] = g[j*K+i] | (p[j*K+i] & c1[i]);
    end
    assign c             = cg[j] ? c1 : c0;
    assign s[j*K +: K]   = p[j*K +: K] ^ c[K-1:0];
    assign cg[j+1]       = c[K];
  end

  assign cout = cg[NG];

  initial assert (N % K == 0) else $error("carry_select_adder: N must be a multiple of K");

endmodule
