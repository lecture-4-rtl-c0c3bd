// ling_adder: adder built on Ling's pseudo-carry.
//
// A conventional lookahead adder propagates the carry G_i = g_i + p_i G_(i-1).
// Ling's pseudo-carry H_i = g_i + t_(i-1) H_(i-1), with t_i = a_i + b_i, is
// related by G_i = t_i H_i: the factor t_i is pulled out of every term, so
// the radix-4 group term becomes
//   H_3 = g_3 + g_2 + t_2 g_1 + t_2 t_1 g_0
// one transistor shorter per stack than G_3 = g_3 + t_3 g_2 + t_3 t_2 g_1
// + t_3 t_2 t_1 g_0, with less loading on the inputs.
//
// Here the word is cut into 4-bit groups. Each group forms that H term and a
// transfer T = t_2 t_1 t_0 t_(-1) so that H at the group's top bit is
// Hg + T * H(previous group top); the chain over groups is the lookahead
// level. Inside a group H ripples by Ling's recurrence. The carry into bit i
// is t_(i-1) H_(i-1) and s_i = (a_i ^ b_i) ^ t_(i-1) H_(i-1). The carry-in
// enters as H_(-1) = cin with t_(-1) = 1.
//
// Parameters: N (multiple of 4). Interface: a, b, cin -> s, cout.
// Combinational. Group size 4 follows the radix-4 example; the ripple inside
// the group and the chain across groups are this design's simple choice.
module ling_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int unsigned NG = N / 4;

  logic [N-1:0] g, t, p;
  logic [N:0]   h;    // h[i+1] = H_i, h[0] = H_(-1) = cin
  logic [N-1:0] tt;   // tt[i+1] = t_i, tt[0] = t_(-1) = 1

  assign g = a & b;
  assign t = a | b;
  assign p = a ^ b;
  assign tt = {t[N-2:0], 1'b1};

  assign h[0] = cin;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    // group pseudo-carry terms, local bit j <-> global bit 4k+j
    logic hg, tg;
    assign hg = g[4*k+3] | g[4*k+2] | (t[4*k+2] & g[4*k+1]) | (t[4*k+2] & t[4*k+1] & g[4*k]);
    assign tg = t[4*k+2] & t[4*k+1] & t[4*k] & tt[4*k];
    // inside the group: Ling recurrence from the previous group's top
    for (genvar j = 0; j < 3; j++) begin : g_in
      assign h[4*k+j+1] = g[4*k+j] | (tt[4*k+j] & h[4*k+j]);
    end
    // group top from the lookahead term
    assign h[4*k+4] = hg | (tg & h[4*k]);
  end

  assign s    = p ^ (tt & h[N-1:0]);
  assign cout = t[N-1] & h[N];

  initial assert (N % 4 == 0) else $error("ling_adder: N must be a multiple of 4");

endmodule
