// sticky_bpd: sticky bit of a multiplier's low product half, found from its
// carry-save sum and carry vectors without adding them.
//
// An N x N multiplier reduces its partial products to a sum vector s and a
// carry vector c. IEEE rounding needs the sticky bit, the OR of the N-1
// least significant product bits, and the carry those bits pass to the
// upper half. Adding s and c and testing for zero is slow. Read as a string
// of T/Z/G symbols from the most significant of these bits, the low part of
// s + c is zero exactly when the string is
//   Z^(N-1)        (nothing to add: carry out 0), or
//   T^j G Z^k      (j + k = N-2: everything carries away: carry out 1).
// The carry out in general is the lookahead pattern P* G X*. So three
// chains suffice: all-Z, the T*GZ* detector, and a carry-generate tree; no
// adder is built.
//
// How it works. Four-symbol groups are summarised and combined four at a
// time by the same rules as the leading-one predictor (N/J/F for the zero
// patterns, generate/propagate for the carry), up a 4-way tree to one
// summary of the whole string.
//
// The three patterns and the idea of detecting them instead of adding are
// the method's; the tree shape and the default N = 53 (IEEE double) are
// this design's choices.
//
// Interface: purely combinational. s and c are the N-1 low bits, bit 0 the
// most significant of them; no carry enters below bit N-2.
module sticky_bpd
  import lop_pkg::*;
#(
  parameter int unsigned N = 53
) (
  input  logic [0:N-2] s,
  input  logic [0:N-2] c,
  output logic         sticky,
  output logic         cout
);

  localparam int W  = N - 1;
  localparam int L  = levels4(W);
  localparam int NP = 4 ** L;

  for (genvar l = 0; l <= L; l++) begin : lv
    localparam int CNT = NP >> (2 * l);
    bpd_t zs  [CNT];   // zero patterns, MSB side first
    gp_t  cg  [CNT];   // carry lookahead

    if (l == 0) begin : g_leaf
      for (genvar i = 0; i < CNT; i++) begin : g_bit
        if (i < W) begin : g_real
          assign zs[i] = bpd_bit(s[i], c[i]);
          assign cg[i] = '{g: s[i] & c[i], p: s[i] | c[i]};
        end else begin : g_pad
          assign zs[i] = bpd_empty;
          assign cg[i] = gp_empty;
        end
      end
    end else begin : g_node
      for (genvar k = 0; k < CNT; k++) begin : g_seg
        assign zs[k] = bpd_cat(bpd_cat(lv[l-1].zs[4*k],   lv[l-1].zs[4*k+1]),
                               bpd_cat(lv[l-1].zs[4*k+2], lv[l-1].zs[4*k+3]));
        assign cg[k] = gp_cat(gp_cat(lv[l-1].cg[4*k],   lv[l-1].cg[4*k+1]),
                              gp_cat(lv[l-1].cg[4*k+2], lv[l-1].cg[4*k+3]));
      end
    end
  end

  bpd_t whole;
  assign whole  = lv[L].zs[0];
  assign sticky = ~(whole.fz | whole.jp);
  assign cout   = lv[L].cg[0].g;

endmodule
