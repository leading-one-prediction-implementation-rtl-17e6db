// lop_tree: leading-one/zero predictor built as a 4-way lookahead tree, the
// organisation used in the IBM RS/6000 floating-point adder.
//
// From the operands a and b alone it predicts how many leading bits of
// a + b (+ carry in) are copies of the result's first bit: preceding zeros of
// a positive result, preceding ones of a negative one. Bit 0 is the MSB.
//
// How it works. Each bit pair is a symbol T, Z or G (see lop_pkg). The result
// starts with a run of equal bits exactly while the symbol string from the
// MSB matches one of Z*, T*GZ* (preceding zeros) or G*, T*ZG* (preceding
// ones), or a prefix of them. Groups of four symbols are summarised by the
// N (all T), J (G or Z just found) and F (all Z or all G) flags, blocks of
// four groups by the same rules one level up (J = JFFF | NJFF | NNJF | NNNJ),
// and so on; a downward pass then gives every bit position the summary of
// all bits above it, as the carry tree of a lookahead adder does. The result
// is the SH array: sh[i] = 1 when bits 0..i match, a run of ones followed by
// zeros. Its length, sh_coarse, may exceed the true count by one, depending
// on the carry into the last matching position. At the first zero of the SH
// array, position i, the fine correction is
//   c_fine = C(i-1) ^ T(i-2) ^ A(i-1)
// where C(i-1) is the carry into bit i-1, taken from the adder, and the
// count is sh_total = sh_coarse - c_fine.
//
// Choices made here: the tree radix is fixed at four; the correction is
// selected from the adder's carries with the one-hot first-zero vector; when
// the first zero is at position 1 (strings ZT.., GT..) the correction is 0,
// since the run is then always one bit long; when the whole string matches,
// the correction is evaluated at the virtual position N with C(N-1) the
// adder's carry in. The one string this does not cover is all T (a == ~b),
// whose sum is 0 or -1; its count can be one short.
//
// FINE_GLOBAL selects how c_fine is formed. 0 uses the equation above, from
// bits i-2 and i-1. 1 uses one global flag instead: whether bits 0..i-1 form
// a zeros run (Z*, T*GZ*) or a ones run (G*, T*ZG*); the correction is then
// C(i-1) for a zeros run and ~C(i-1) for a ones run. Both are the method's;
// the flag is read from the same tree summaries that give the SH array. They
// give the same result.
//
// Interface: purely combinational. c[i] is the carry into bit i (c[N-1] is
// the adder's carry in). The prediction (sh, sh_coarse) does not depend on
// c; only c_fine and sh_total do.
module lop_tree
  import lop_pkg::*;
#(
  parameter int unsigned N           = 54,
  parameter bit          FINE_GLOBAL = 1'b0
) (
  input  logic [0:N-1]           a,
  input  logic [0:N-1]           b,
  input  logic [0:N-1]           c,
  output logic [0:N-1]           sh,
  output logic [$clog2(N+1)-1:0] sh_coarse,
  output logic                   c_fine,
  output logic [$clog2(N+1)-1:0] sh_total
);

  localparam int L  = levels4(N);
  localparam int NP = 4 ** L;
  localparam int CW = $clog2(N + 1);

  logic [0:N-1] t;
  assign t = a ^ b;

  // lv[l].sum[s]: summary of the l-th level segment s (4**l bits).
  // lv[l].pre[s]: summary of every bit above that segment.
  for (genvar l = 0; l <= L; l++) begin : lv
    localparam int CNT = NP >> (2 * l);
    bpd_t sum [CNT];
    bpd_t pre [CNT];

    // upward pass
    if (l == 0) begin : g_leaf
      for (genvar i = 0; i < CNT; i++) begin : g_bit
        if (i < N) begin : g_real
          assign sum[i] = bpd_bit(a[i], b[i]);
        end else begin : g_pad
          assign sum[i] = bpd_empty;
        end
      end
    end else begin : g_node
      for (genvar s = 0; s < CNT; s++) begin : g_seg
        assign sum[s] = bpd_cat(bpd_cat(lv[l-1].sum[4*s],   lv[l-1].sum[4*s+1]),
                                bpd_cat(lv[l-1].sum[4*s+2], lv[l-1].sum[4*s+3]));
      end
    end

    // downward pass
    if (l == L) begin : g_root
      assign pre[0] = bpd_empty;
    end else begin : g_down
      for (genvar s = 0; s < CNT; s++) begin : g_seg
        localparam int M = s % 4;
        localparam int B = s - M;
        if (M == 0) begin : g_m0
          assign pre[s] = lv[l+1].pre[s/4];
        end else if (M == 1) begin : g_m1
          assign pre[s] = bpd_cat(lv[l+1].pre[s/4], sum[B]);
        end else if (M == 2) begin : g_m2
          assign pre[s] = bpd_cat(lv[l+1].pre[s/4], bpd_cat(sum[B], sum[B+1]));
        end else begin : g_m3
          assign pre[s] = bpd_cat(lv[l+1].pre[s/4],
                                  bpd_cat(bpd_cat(sum[B], sum[B+1]), sum[B+2]));
        end
      end
    end
  end

  // SH array: bits 0..i match a pattern; ones[i]: bits 0..i are a ones run
  logic [0:N-1] ones;
  for (genvar i = 0; i < N; i++) begin : g_sh
    bpd_t incl;
    assign incl    = bpd_cat(lv[0].pre[i], lv[0].sum[i]);
    assign sh[i]   = bpd_match(incl);
    assign ones[i] = incl.jn | incl.fg;
  end

  // first zero of the SH array; position N stands for "all matched"
  // (a first zero at position 1 needs no correction and is not decoded)
  logic [2:N] first0;
  always_comb begin
    for (int i = 2; i < N; i++) first0[i] = sh[i-1] & ~sh[i];
    first0[N] = sh[N-1];
  end

  always_comb begin
    sh_coarse = '0;
    for (int i = 0; i < N; i++) sh_coarse = sh_coarse + CW'(sh[i]);
  end

  // c_fine at the first zero i >= 2, either from bits i-2 and i-1,
  //   C(i-1) ^ T(i-2) ^ A(i-1),
  // or from the global run kind, C(i-1) ^ ones(i-1)
  always_comb begin
    c_fine = 1'b0;
    for (int i = 2; i <= N; i++)
      if (FINE_GLOBAL)
        c_fine = c_fine | (first0[i] & (c[i-1] ^ ones[i-1]));
      else
        c_fine = c_fine | (first0[i] & (c[i-1] ^ t[i-2] ^ a[i-1]));
  end

  assign sh_total = sh_coarse - CW'(c_fine);

  // The SH array is a run of ones from bit 0 followed by zeros.
  always_comb begin
    for (int i = 1; i < N; i++)
      assert (!(sh[i] && !sh[i-1])) else $error("lop_tree: SH array is not a run of ones");
    assert (sh[0]) else $error("lop_tree: SH_0 must always be 1");
  end

endmodule
