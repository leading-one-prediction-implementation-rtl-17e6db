// lop_dist: distributed leading-one/zero predictor, built from one
// lop_dist_cell per bit.
//
// It predicts the same count as lop_tree, the number of leading result bits
// equal to the first one, but from local three-bit windows instead of a
// pattern-state tree. Every cell tests whether the run continues through its
// bit (U); a parallel prefix AND over the U signals gives each cell f, "all
// cells above continued", so the first cell where the run stops can flag
// itself in the one-hot vector l. If the first stop is at position i, the
// run's last bit is predicted at i-1, so sh_coarse = i-1, and the count is
// sh_total = sh_coarse + e, where e is the NOR of all cells' e outputs: 1
// when the carry shows that the run reaches one bit further.
//
// The per-cell equations and the NOR of the e signals follow the method,
// which asks for a parallel detector of the first stop but does not give
// one. The prefix AND is built here as a 4-way lookahead tree of the same
// shape as lop_tree's, so the whole predictor takes O(log N) levels.
//
// Boundaries, which the per-bit equations do not cover and which are this
// design's choice: bit 0 always continues (a single symbol is always a run);
// bit 1 stops only on ZT or GT, where the run is always exactly one bit and e
// is forced to 1; a virtual position N stops the chain when every bit
// continued, with the correction ~C(N-1) ^ T(N-2) ^ A(N-1), C(N-1) being the
// adder's carry in. As in lop_tree, an all-T string (sum 0 or -1) may be
// counted one off.
//
// FINE_EQN7 selects the form of each cell's correction test (see
// lop_dist_cell): 0 gates the carry into bit i with T(i), 1 uses the carry
// into bit i-1 alone. The count is the same.
//
// Interface: combinational; c[i] is the carry into bit i; bit 0 is the MSB.
module lop_dist
  import lop_pkg::*;
#(
  parameter int unsigned N         = 54,
  parameter bit          FINE_EQN7 = 1'b0
) (
  input  logic [0:N-1]           a,
  input  logic [0:N-1]           b,
  input  logic [0:N-1]           c,
  output logic [0:N]             l,
  output logic                   e,
  output logic [$clog2(N+1)-1:0] sh_coarse,
  output logic [$clog2(N+1)-1:0] sh_total
);

  localparam int CW = $clog2(N + 1);
  localparam int L  = levels4(N);
  localparam int NP = 4 ** L;

  logic [0:N-1] t;
  logic [0:N-1] u;
  logic [0:N]   f;
  logic [0:N]   ev;

  // bit 0: always continues
  assign t[0]  = a[0] ^ b[0];
  assign u[0]  = 1'b1;
  assign l[0]  = 1'b0;
  assign ev[0] = 1'b0;

  // bit 1: stops only on ZT / GT, where the count is exactly one
  assign t[1]  = a[1] ^ b[1];
  assign u[1]  = t[0] | ~t[1];
  assign l[1]  = f[1] & ~u[1];
  assign ev[1] = 1'b0;

  for (genvar i = 2; i < N; i++) begin : g_cell
    lop_dist_cell #(.FINE_EQN7(FINE_EQN7)) u_cell (
      .a_i   (a[i]),
      .b_i   (b[i]),
      .t_im1 (t[i-1]),
      .t_im2 (t[i-2]),
      .a_im1 (a[i-1]),
      .c_sel (FINE_EQN7 ? c[i-1] : c[i]),
      .f_in  (f[i]),
      .t_i   (t[i]),
      .u_i   (u[i]),
      .l_i   (l[i]),
      .e_i   (ev[i])
    );
  end

  // f[i] = AND of u[0..i-1]: 4-way tree, upward AND of aligned segments
  // (lv[lvl].all), downward AND of everything above a segment (lv[lvl].above).
  for (genvar lvl = 0; lvl <= L; lvl++) begin : lv
    localparam int CNT = NP >> (2 * lvl);
    logic all   [CNT];
    logic above [CNT];

    if (lvl == 0) begin : g_leaf
      for (genvar r = 0; r < CNT; r++) begin : g_bit
        if (r < N) begin : g_real
          assign all[r] = u[r];
        end else begin : g_pad
          assign all[r] = 1'b1;
        end
      end
    end else begin : g_node
      for (genvar s = 0; s < CNT; s++) begin : g_seg
        assign all[s] = lv[lvl-1].all[4*s]   & lv[lvl-1].all[4*s+1] &
                        lv[lvl-1].all[4*s+2] & lv[lvl-1].all[4*s+3];
      end
    end

    if (lvl == L) begin : g_root
      assign above[0] = 1'b1;
    end else begin : g_down
      for (genvar s = 0; s < CNT; s++) begin : g_seg
        localparam int M = s % 4;
        localparam int B = s - M;
        if (M == 0) begin : g_m0
          assign above[s] = lv[lvl+1].above[s/4];
        end else if (M == 1) begin : g_m1
          assign above[s] = lv[lvl+1].above[s/4] & all[B];
        end else if (M == 2) begin : g_m2
          assign above[s] = lv[lvl+1].above[s/4] & all[B] & all[B+1];
        end else begin : g_m3
          assign above[s] = lv[lvl+1].above[s/4] & all[B] & all[B+1] & all[B+2];
        end
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_f
    assign f[i] = lv[0].above[i];
  end
  assign f[N] = lv[L].all[0];

  // virtual stop at position N
  assign l[N]  = f[N];
  assign ev[N] = f[N] & ~(~c[N-1] ^ t[N-2] ^ a[N-1]);

  assign e = ~|ev;

  always_comb begin
    sh_coarse = '0;
    for (int i = 1; i <= N; i++)
      if (l[i]) sh_coarse = CW'(i - 1);
  end

  assign sh_total = sh_coarse + CW'(e);

  // Exactly one position stops the chain (the virtual position N included).
  always_comb begin
    assert (l != '0 && (l & (l - 1'b1)) == '0) else $error("lop_dist: stop vector is not one-hot");
  end

endmodule
