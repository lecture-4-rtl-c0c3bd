// carry_skip_adder: carry-bypass (carry-skip) adder.
//
// The word is cut into groups. Every group ripples its own carry in parallel
// with the others, and a global chain carries between groups: the carry out
// of group g is
//   Cout_g = (ripple carry out of the group) + Pg * Cin_g
// where Pg, the AND of the group's bit propagates, says that a carry entering
// the group would pass all the way through. The bypass term lets the global
// carry jump a whole group in two gate delays instead of rippling through it;
// with equal groups of k bits the critical path is about 2(k-1) + (N/k - 2)
// gate delays.
//
// Group sizes are a parameter, least significant group first. Equal groups
// are not the best choice: low groups should be small and grow, so that
// each produces its carry just as the global chain reaches it, and high
// groups should shrink again, so that the last ripple in every group ends
// at the same time. The default 16-bit split 2-3-4-4-3 follows that rule.
//
// Parameters: NG (number of groups), GS (their sizes), N (sum of GS).
// Interface: a, b, cin -> s, cout. Combinational.
module carry_skip_adder #(
  parameter int unsigned NG      = 5,
  parameter int unsigned GS [NG] = '{2, 3, 4, 4, 3},
  parameter int unsigned N       = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  // first bit of group j
  function automatic int unsigned base(int unsigned j);
    int unsigned o = 0;
    for (int unsigned i = 0; i < j; i++) o += GS[i];
    return o;
  endfunction

  logic [NG:0]  cg;      // global carry into each group
  logic [N-1:0] p;       // bit propagate (XOR, also used for the sum)
  logic [N-1:0] g;       // bit generate

  assign p     = a ^ b;
  assign g     = a & b;
  assign cg[0] = cin;

  for (genvar j = 0; j < NG; j++) begin : g_grp
    localparam int unsigned B = base(j);
    localparam int unsigned K = GS[j];
    logic [K:0] c;       // ripple carries inside the group
    logic       pg;      // group propagate
    assign c[0] = cg[j];
    for (genvar i = 0; i < K; i++) begin : g_bit
      assign c[i+1]   = g[B+i] | (p[B+i] & c[i]);
      assign s[B+i]   = p[B+i] ^ c[i];
    end
    assign pg      = &p[B +: K];
    assign cg[j+1] = c[K] | (pg & cg[j]);
  end

  assign cout = cg[NG];

  initial assert (base(NG) == N) else $error("carry_skip_adder: group sizes must add up to N");

endmodule
