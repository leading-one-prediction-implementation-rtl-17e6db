// lop_pos: leading-zero predictor for a difference known to be positive,
// as used behind a magnitude comparator and swapper.
//
// When the larger magnitude is always the minuend, a + b is a + ~small
// (+1) with a >= small, and the result can only begin with zeros. Only the
// pattern T*GZ* (and its prefix T*) then has to be found, one pattern family
// instead of two. The tree is the same 4-way N/J/F lookahead tree as in
// lop_tree, restricted to the N and J states (J needs the F = all-Z state of
// the segment below it): sh[i] = 1 when bits 0..i match T*GZ* or T*.
//
// Fine correction. Every run found is a run of zeros, so at the first zero i
// of the SH array the count is one smaller exactly when a carry enters the
// last matching bit:
//   c_fine = C(i-1),   sh_total = sh_coarse - c_fine.
// Unlike the two-family form, this needs no look at bits i-2 and i-1, and so
// it also holds at the MSB: a string starting G followed by G or T gives a
// one-bit match, and C(0) tells whether the difference is already
// normalised (count 0) or not (count 1). This correction is this design's
// working of the zeros case. A string that matches over all N bits is
// corrected with C(N-1), the carry in; a == ~b (equal magnitudes, result 0)
// is then counted N-1.
//
// Interface: purely combinational; c[i] is the carry into bit i of the
// subtraction, bit 0 is the MSB. Undefined if the sum is negative.
module lop_pos
  import lop_pkg::*;
#(
  parameter int unsigned N = 54
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

  // SH array: bits 0..i match a pattern
  for (genvar i = 0; i < N; i++) begin : g_sh
    bpd_t incl;
    assign incl  = bpd_cat(lv[0].pre[i], lv[0].sum[i]);
    assign sh[i] = incl.n | incl.jp;
  end

  // first zero of the SH array; position N stands for "all matched"
  logic [1:N] first0;
  always_comb begin
    for (int i = 1; i < N; i++) first0[i] = sh[i-1] & ~sh[i];
    first0[N] = sh[N-1];
  end

  always_comb begin
    sh_coarse = '0;
    for (int i = 0; i < N; i++) sh_coarse = sh_coarse + CW'(sh[i]);
  end

  // c_fine = C(i-1) at the first zero i of the SH array
  always_comb begin
    c_fine = 1'b0;
    for (int i = 1; i <= N; i++)
      c_fine = c_fine | (first0[i] & c[i-1]);
  end

  assign sh_total = sh_coarse - CW'(c_fine);

  // The SH array is a run of ones from bit 0 followed by zeros.
  always_comb begin
    for (int i = 1; i < N; i++)
      assert (!(sh[i] && !sh[i-1])) else $error("lop_pos: SH array is not a run of ones");
  end

endmodule
