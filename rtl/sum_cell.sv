// sum_cell: dual-rail sum cell, S = A xor B xor C.
//
// Three stages, each taking and giving both polarities of its signals:
// an XOR/XNOR stage forms A^B and its complement from A, A_bar, B, B_bar; a
// multiplexer stage steered by C and C_bar passes XOR when C = 0 and XNOR
// when C = 1 (and the opposite to the complementary output); a buffer stage
// (two inverters) restores the outputs S and S_bar. At transistor level this
// is pass-gate logic, one of the few places where it pays off; here it is
// written as logic. Combinational.
module sum_cell (
  input  logic a,
  input  logic a_n,
  input  logic b,
  input  logic b_n,
  input  logic c,
  input  logic c_n,
  output logic s,
  output logic s_n
);

  logic x, xn;     // A xor B, A xnor B
  logic m, mn;     // mux outputs

  always_comb begin
    x  = (a & b_n) | (a_n & b);
    xn = (a & b) | (a_n & b_n);
    m  = (c & xn) | (c_n & x);
    mn = (c & x) | (c_n & xn);
    s   = ~(~m);
    s_n = ~(~mn);
  end

endmodule
