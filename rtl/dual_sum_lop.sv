// dual_sum_lop: leading-one prediction beside a compound adder that forms
// both a + b and a + b + 1, choosing which sum's carries the fine
// correction must look at.
//
// Some floating-point adders compute x + ~y and x + ~y + 1 together, so that
// a later rounding increment costs only a selection. The predictor then has
// to know which of the two sums is the result it is counting. In a
// subtraction with exponents that differ by at most one, the only bit of the
// smaller operand y that falls below the kept width is its LSB, y_out (0
// when the exponents are equal). Writing the full difference one place wider,
//   (x:0) - (y:y_out) = (x:0) + (~y:~y_out) + 1,
// the +1 at the bottom carries into the kept bits exactly when y_out = 0.
// So the kept bits of x - y are x + ~y + 1 when y_out = 0 and x + ~y when
// y_out = 1, and the bit below them (the guard bit) equals y_out. The
// predictor reads the carries of the selected sum: y_out picks the carry
// vector before either sum is complete.
//
// How it works. Two cla_adder instances form the sums with carry in 0 and 1;
// they have identical group trees, which synthesis shares, and differ only
// in the carries handed down from the root. lop_tree predicts the leading
// run of x + ~y (+1) from x and ~y; only its fine correction uses the
// carries, taken from sum1 when y_out = 0 and from sum0 when y_out = 1.
//
// The observation that the LSB of the smaller operand decides which carries
// to use follows the method; the method leaves the rest to another design.
// Forming the two sums with two lookahead adders, and the guard-bit
// formulation above, are this design's own. The difference is two's
// complement: a negative result (y > x, possible only when the exponents
// are equal) is counted as a run of ones. As in lop_tree, x == y (all-T
// string, difference 0) may be counted one off.
//
// Interface: purely combinational. Bit 0 is the MSB. diff is the selected
// sum, guard the bit below it, shamt the number of leading bits of diff
// equal to diff[0].
module dual_sum_lop #(
  parameter int unsigned N = 54
) (
  input  logic [0:N-1]           x,
  input  logic [0:N-1]           y,
  input  logic                   y_out,
  output logic [0:N-1]           sum0,
  output logic [0:N-1]           sum1,
  output logic [0:N-1]           diff,
  output logic                   guard,
  output logic                   c_fine,
  output logic [$clog2(N+1)-1:0] shamt
);

  localparam int CW = $clog2(N + 1);

  logic [0:N-1] ny;
  logic [0:N-1] c0, c1;
  logic         cout0, cout1, g0, g1;
  logic [0:N-1] sh;
  logic [CW-1:0] coarse;

  assign ny = ~y;

  cla_adder #(.N(N)) u_add0 (
    .a(x), .b(ny), .cin(1'b0), .sum(sum0), .c(c0), .cout(cout0), .g_all(g0)
  );

  cla_adder #(.N(N)) u_add1 (
    .a(x), .b(ny), .cin(1'b1), .sum(sum1), .c(c1), .cout(cout1), .g_all(g1)
  );

  assign diff  = y_out ? sum0 : sum1;
  assign guard = y_out;

  lop_tree #(.N(N)) u_lop (
    .a(x), .b(ny), .c(y_out ? c0 : c1),
    .sh(sh), .sh_coarse(coarse), .c_fine(c_fine), .sh_total(shamt)
  );

  // the two adders differ only in their carry in: same generate, and
  // sum1 = sum0 + 1
  always_comb begin
    assert (g0 == g1) else $error("dual_sum_lop: adders disagree on generate");
    assert (sum1 == sum0 + 1'b1) else $error("dual_sum_lop: sum1 != sum0 + 1");
  end

endmodule
