// lop_norm_top: the massive-cancellation path of a floating-point adder,
// normalising |ma - mb| with leading-one prediction, plus a multiplier's
// sticky-bit unit standing beside it.
//
// Normalisation path. The aligned magnitudes ma and mb (N-1 bits each) are
// extended with a zero sign bit; mb is inverted and both go to the
// one's-complement adder, whose end-around carry and final inversion yield
// sign and magnitude of ma - mb. In parallel with the addition two
// predictors count the leading bits of the raw sum that equal its sign,
// which is the normalising shift of the magnitude:
//   - lop_tree, the 4-way N/J/F tree, gives the exact count (coarse count
//     minus its fine correction) and drives left shifter "tree";
//   - lop_dist, the distributed predictor, gives a coarse count that drives
//     left shifter "dist" directly and a correction E that drives its last
//     one-place stage.
// A third path shows the other way to serve sign-magnitude operands:
// mag_swap compares the magnitudes and puts the larger first, cla_adder
// subtracts the smaller (larger + ~smaller + 1), and lop_pos, which only has to
// find runs of zeros, predicts the shift of the never-negative difference.
// All three normalised results (leading one in bit 0) and shift counts are
// outputs, so the predictors can be compared; a real adder would build only
// one of these paths. When ma == mb the magnitude is zero and the counts have
// no meaning; the normalised outputs are then zero.
//
// Compound-adder path. dual_sum_lop forms x + ~y and x + ~y + 1 at once,
// with x = {0, ma} and y = {0, mb}, and takes mb_out, the bit of mb shifted
// out during alignment (0 when the exponents are equal). It selects the
// kept bits of ma - mb - mb_out/2 (dual_diff, two's complement, guard bit
// dual_guard) and predicts their leading run (dual_shamt) from the carries
// of whichever sum was selected.
//
// Sticky unit. sticky_bpd has its own ports: the low N-1 bits of a
// multiplier's sum and carry vectors in, sticky bit and carry out.
//
// The datapath shape (predictor beside the adder, both feeding the shifter)
// both sign-magnitude methods and the choice of carries by the smaller
// operand's LSB follow the method. Building all paths
// side by side, the widths N = 54 and NM = 53, and leaving out exponent
// logic, alignment and rounding are this design's choices.
//
// The raw sum, end-around carry, SH array, one-hot stop vector and both
// coarse counts are also brought out for observation.
//
// Interface: purely combinational, no clock. Bit 0 is the MSB of every
// vector.
module lop_norm_top #(
  parameter int unsigned N  = 54,
  parameter int unsigned NM = 53,
  localparam int         CW = $clog2(N + 1)
) (
  input  logic [0:N-2]           ma,
  input  logic [0:N-2]           mb,
  output logic [0:N-1]           raw_sum,
  output logic                   eac,
  output logic                   neg,
  output logic [0:N-1]           mag,
  output logic [0:N-1]           sh,
  output logic [CW-1:0]          coarse_tree,
  output logic [0:N]             l1hot,
  output logic [CW-1:0]          coarse_dist,
  output logic [CW-1:0]          shamt_tree,
  output logic [0:N-1]           norm_tree,
  output logic [CW-1:0]          shamt_dist,
  output logic [0:N-1]           norm_dist,
  output logic                   swapped,
  output logic [0:N-1]           diff_swap,
  output logic                   fine_swap,
  output logic [CW-1:0]          shamt_swap,
  output logic [0:N-1]           norm_swap,
  output logic                   fine_tree,
  output logic                   fine_dist,
  input  logic                   mb_out,
  output logic [0:N-1]           dual_diff,
  output logic                   dual_guard,
  output logic                   fine_dual,
  output logic [CW-1:0]          dual_shamt,
  input  logic [0:NM-2]          mul_s,
  input  logic [0:NM-2]          mul_c,
  output logic                   sticky,
  output logic                   mul_cout
);

  logic [0:N-1] opa, opb, carry;

  assign opa = {1'b0, ma};
  assign opb = ~{1'b0, mb};

  ones_comp_adder #(.N(N)) u_add (
    .a   (opa),
    .b   (opb),
    .sum (raw_sum),
    .c   (carry),
    .eac (eac),
    .neg (neg),
    .mag (mag)
  );

  lop_tree #(.N(N)) u_lop_tree (
    .a         (opa),
    .b         (opb),
    .c         (carry),
    .sh        (sh),
    .sh_coarse (coarse_tree),
    .c_fine    (fine_tree),
    .sh_total  (shamt_tree)
  );

  lop_dist #(.N(N)) u_lop_dist (
    .a         (opa),
    .b         (opb),
    .c         (carry),
    .l         (l1hot),
    .e         (fine_dist),
    .sh_coarse (coarse_dist),
    .sh_total  (shamt_dist)
  );

  left_shifter #(.N(N)) u_shift_tree (
    .d     (mag),
    .shamt (shamt_tree),
    .fine  (1'b0),
    .q     (norm_tree)
  );

  left_shifter #(.N(N)) u_shift_dist (
    .d     (mag),
    .shamt (coarse_dist),
    .fine  (fine_dist),
    .q     (norm_dist)
  );

  // second sign-magnitude method: compare, swap, subtract the smaller
  logic [0:N-1] larger, smaller, nsmaller, carry_swap;
  logic         cout_swap;
  logic [0:N-1] sh_pos;
  logic [CW-1:0] coarse_pos;

  mag_swap #(.N(N)) u_swap (
    .x       (opa),
    .y       ({1'b0, mb}),
    .larger  (larger),
    .smaller (smaller),
    .swapped (swapped)
  );

  assign nsmaller = ~smaller;

  cla_adder #(.N(N)) u_sub (
    .a     (larger),
    .b     (nsmaller),
    .cin   (1'b1),
    .sum   (diff_swap),
    .c     (carry_swap),
    .cout  (cout_swap),
    .g_all ()
  );

  lop_pos #(.N(N)) u_lop_pos (
    .a         (larger),
    .b         (nsmaller),
    .c         (carry_swap),
    .sh        (sh_pos),
    .sh_coarse (coarse_pos),
    .c_fine    (fine_swap),
    .sh_total  (shamt_swap)
  );

  left_shifter #(.N(N)) u_shift_swap (
    .d     (diff_swap),
    .shamt (shamt_swap),
    .fine  (1'b0),
    .q     (norm_swap)
  );

  // compound adder with carry selection by the bit shifted out of mb
  logic [0:N-1] dual_sum0, dual_sum1;

  dual_sum_lop #(.N(N)) u_dual (
    .x      (opa),
    .y      ({1'b0, mb}),
    .y_out  (mb_out),
    .sum0   (dual_sum0),
    .sum1   (dual_sum1),
    .diff   (dual_diff),
    .guard  (dual_guard),
    .c_fine (fine_dual),
    .shamt  (dual_shamt)
  );

  sticky_bpd #(.N(NM)) u_sticky (
    .s      (mul_s),
    .c      (mul_c),
    .sticky (sticky),
    .cout   (mul_cout)
  );

endmodule
