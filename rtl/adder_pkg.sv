// adder_pkg: types and the one operator every adder here is built on.
//
// A generate/propagate pair (pg_t) describes what a group of bits does to a
// carry: it produces one (g) or passes an incoming one through (p). Two
// adjacent groups merge into one with
//     G = G_hi + P_hi * G_lo,   P = P_hi * P_lo
// which is associative; that is what lets the prefix trees below compute all
// carries in logarithmic depth. Propagate is the OR form p = a + b, which is
// faster than XOR and gives the same carries; sums always use a XOR b.
package adder_pkg;

  typedef struct packed {
    logic g;
    logic p;
  } pg_t;

  // Group made of `hi` sitting directly above `lo`.
  function automatic pg_t pg_merge(pg_t hi, pg_t lo);
    pg_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Single-bit generate and (OR) propagate.
  function automatic pg_t pg_bit(logic a, logic b);
    pg_t r;
    r.g = a & b;
    r.p = a | b;
    return r;
  endfunction

endpackage
