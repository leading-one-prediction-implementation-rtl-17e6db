// ones_comp_adder: one's-complement adder with end-around carry, the front
// end that lets a two's-complement leading-one predictor serve sign-magnitude
// (IEEE) significands.
//
// Subtracting magnitudes as a + ~b in one's complement, then inverting a
// negative result, gives the magnitude of the difference without a second
// addition. Inversion does not move the leading one: the preceding ones of
// the raw sum become the preceding zeros of the magnitude. So a predictor
// that finds both preceding zeros and preceding ones, fed with a and b and
// with this adder's carries, gives the normalising shift of the magnitude.
//
// How it works. The end-around carry is the carry out of a + b with no
// carry in, which is the whole-word generate of the lookahead tree; it then
// enters the LSB as the carry in (sum = a + b + eac). No signal loops, since
// the generate does not depend on the carry in. neg is the raw sum's MSB;
// mag is the raw sum, bit-inverted when neg is set. An all-ones raw sum
// (equal magnitudes) is negative zero; mag is then 0.
//
// The one's-complement method is the method's; taking the end-around carry
// from the whole-word generate is this design's choice.
//
// Interface: purely combinational. c[i] is the carry into bit i including
// the end-around carry; bit 0 is the MSB.
module ones_comp_adder #(
  parameter int unsigned N = 54
) (
  input  logic [0:N-1] a,
  input  logic [0:N-1] b,
  output logic [0:N-1] sum,
  output logic [0:N-1] c,
  output logic         eac,
  output logic         neg,
  output logic [0:N-1] mag
);

  logic g_all;
  logic cout_unused;

  cla_adder #(.N(N)) u_add (
    .a     (a),
    .b     (b),
    .cin   (eac),
    .sum   (sum),
    .c     (c),
    .cout  (cout_unused),
    .g_all (g_all)
  );

  assign eac = g_all;
  assign neg = sum[0];
  assign mag = neg ? ~sum : sum;

endmodule
