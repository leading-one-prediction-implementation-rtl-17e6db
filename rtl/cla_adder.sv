// cla_adder: two's-complement adder with a 4-way carry-lookahead tree.
//
// It is the adder beside the leading-one predictor: it produces the sum and,
// for the predictor's fine correction, the carry into every bit position.
// Bit 0 is the MSB, as in the predictor.
//
// How it works. Carry lookahead is itself a bit-pattern detection: a carry
// leaves a group when its bits, read from the top, match T*G followed by
// anything. Each bit gives generate G = a&b and propagate P = a|b (P may
// replace T here because what follows the G does not matter). Groups of four
// bits form
//   G_group = G3 | P3 G2 | P3 P2 G1 | P3 P2 P1 G0     (3 = most significant)
// and the same formula combines four groups into a block, and so on up a
// 4-way tree. A downward pass hands each group the carry into it, and each
// bit position finally gets its carry c[i]; sum[i] = a[i] ^ b[i] ^ c[i].
//
// The group-generate formula and the P-for-T substitution are the standard
// lookahead equations; the 4-way tree shape, matching the predictor's, and
// the per-bit carry outputs are this design's choices.
//
// g_all is the generate of the whole word, independent of cin: the carry out
// of a + b with no carry in. A one's-complement adder uses it as its
// end-around carry without forming a loop through cin.
//
// Interface: purely combinational. c[i] is the carry into bit i, so
// c[N-1] == cin; cout is the carry out of bit 0.
module cla_adder
  import lop_pkg::*;
#(
  parameter int unsigned N = 54
) (
  input  logic [0:N-1] a,
  input  logic [0:N-1] b,
  input  logic         cin,
  output logic [0:N-1] sum,
  output logic [0:N-1] c,
  output logic         cout,
  output logic         g_all
);

  localparam int L  = levels4(N);
  localparam int NP = 4 ** L;

  // Segments are numbered from the LSB: leaf r holds bit N-1-r.
  // lv[l].grp[s]: (g,p) of segment s; lv[l].cy[s]: carry into segment s.
  for (genvar l = 0; l <= L; l++) begin : lv
    localparam int CNT = NP >> (2 * l);
    gp_t  grp [CNT];
    logic cy  [CNT];

    if (l == 0) begin : g_leaf
      for (genvar r = 0; r < CNT; r++) begin : g_bit
        if (r < N) begin : g_real
          assign grp[r] = '{g: a[N-1-r] & b[N-1-r], p: a[N-1-r] | b[N-1-r]};
        end else begin : g_pad
          assign grp[r] = gp_empty;
        end
      end
    end else begin : g_node
      for (genvar s = 0; s < CNT; s++) begin : g_seg
        assign grp[s] = gp_cat(gp_cat(lv[l-1].grp[4*s+3], lv[l-1].grp[4*s+2]),
                               gp_cat(lv[l-1].grp[4*s+1], lv[l-1].grp[4*s]));
      end
    end

    if (l == L) begin : g_root
      assign cy[0] = cin;
    end else begin : g_down
      for (genvar s = 0; s < CNT; s++) begin : g_seg
        localparam int M = s % 4;
        localparam int B = s - M;
        gp_t below;
        if (M == 0) begin : g_m0
          assign below = gp_empty;
        end else if (M == 1) begin : g_m1
          assign below = grp[B];
        end else if (M == 2) begin : g_m2
          assign below = gp_cat(grp[B+1], grp[B]);
        end else begin : g_m3
          assign below = gp_cat(gp_cat(grp[B+2], grp[B+1]), grp[B]);
        end
        assign cy[s] = below.g | (below.p & lv[l+1].cy[s/4]);
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_sum
    assign c[i]   = lv[0].cy[N-1-i];
    assign sum[i] = a[i] ^ b[i] ^ c[i];
  end

  assign g_all = lv[L].grp[0].g;
  assign cout  = lv[L].grp[0].g | (lv[L].grp[0].p & cin);

endmodule
