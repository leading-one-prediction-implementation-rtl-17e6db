// lop_pkg: types and combining functions shared by the leading-one
// prediction (LOP) blocks, the carry-lookahead adder and the sticky-bit unit.
//
// Every block here treats its input as a string of bit-pair symbols, one per
// bit position, read from the most significant bit (numbered 0) towards the
// least significant bit:
//   T = a xor b, Z = not (a or b), G = a and b, P = a or b.
// A segment of that string is summarised by which patterns it matches in
// full. bpd_t carries five such flags:
//   n  : T*        (all T, "not found")
//   jp : T* G Z*   (the G has been found, positive result)
//   fz : Z*        (all Z, "found")
//   jn : T* Z G*   (mirror pattern, negative result)
//   fg : G*        (all G)
// bpd_cat() joins the summary of a more significant segment X with that of
// the less significant segment Y that follows it, the N/J/F rules
// NN->N, NJ->J, JF->J, FF->F applied to both pattern families. The operator is
// associative, so the summaries can be combined in any tree; bpd_empty is its
// identity (the empty string matches T*, Z* and G*).
// The same idea with generate/propagate pairs gives carry lookahead:
// gp_cat() joins a more significant (g,p) group with a less significant one.
package lop_pkg;

  typedef struct packed {
    logic n;
    logic jp;
    logic fz;
    logic jn;
    logic fg;
  } bpd_t;

  localparam bpd_t bpd_empty = '{n: 1'b1, jp: 1'b0, fz: 1'b1, jn: 1'b0, fg: 1'b1};

  // Summary of one bit position.
  function automatic bpd_t bpd_bit(input logic a, input logic b);
    bpd_t s;
    s.n  = a ^ b;          // T
    s.jp = a & b;          // G alone is T^0 G Z^0
    s.fz = ~(a | b);       // Z
    s.jn = ~(a | b);       // Z alone is T^0 Z G^0
    s.fg = a & b;          // G
    return s;
  endfunction

  // x is the more significant segment, y the less significant one.
  function automatic bpd_t bpd_cat(input bpd_t x, input bpd_t y);
    bpd_t r;
    r.n  = x.n & y.n;
    r.jp = (x.n & y.jp) | (x.jp & y.fz);
    r.fz = x.fz & y.fz;
    r.jn = (x.n & y.jn) | (x.jn & y.fg);
    r.fg = x.fg & y.fg;
    return r;
  endfunction

  // A string is a valid LOP prefix when it matches one of the four patterns
  // or a prefix of them (T* is a prefix of both T*GZ* and T*ZG*).
  function automatic logic bpd_match(input bpd_t s);
    return s.n | s.jp | s.fz | s.jn | s.fg;
  endfunction

  typedef struct packed {
    logic g;   // the group generates a carry out
    logic p;   // the group passes an incoming carry through
  } gp_t;

  localparam gp_t gp_empty = '{g: 1'b0, p: 1'b1};

  // hi is the more significant group, lo the less significant one.
  function automatic gp_t gp_cat(input gp_t hi, input gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Number of 4-way tree levels needed to cover w positions.
  function automatic int levels4(input int w);
    int l = 0;
    int span = 1;
    while (span < w) begin
      span = span * 4;
      l = l + 1;
    end
    return (l == 0) ? 1 : l;
  endfunction

endpackage
