// lop_dist_cell: one bit position of the distributed leading-one predictor.
//
// Instead of tracking pattern states over whole groups, the distributed
// predictor looks at three neighbouring symbols only: bits i-2, i-1 and i.
// When bit i-1 is not T, the two bits above bit i already tell whether the
// string so far is a run of preceding zeros (ZZ, GZ, TG: it must continue
// with Z) or of preceding ones (GG, TZ, ZG: it must continue with G). With
// x = T(i-2) ^ A(i-1), which is 1 for the second kind,
//   U(i) = T(i-1) | ~T(i-1) & (~x & Z(i) | x & G(i))
// is 1 while the run continues. A T at bit i-1 always continues: a ZT or GT
// pair has already stopped the run one position earlier.
//
// f_in is 1 when every cell above continued (formed outside the cell, by a
// prefix AND over the U outputs); the cell marks itself as the first stop
// with l = f_in & ~U(i). The run's leading bit is then taken to be at i-1 and the
// count is one more when
//   cfine = T(i) & (C(i) ^ ~x)                 (FINE_EQN7 = 0)
// with C(i) the carry into bit i. Since T(i) & C(i) is the carry into bit
// i-1 whenever T(i) = 1, the same test can be written with that carry,
//   cfine = ~C(i-1) ^ x                         (FINE_EQN7 = 1)
// which drops the AND with T(i); the two differ only where T(i) = 0, and at
// a stop with T(i) = 0 both are 0. e = l & ~cfine; the predictor NORs all e
// to obtain the correction.
//
// Both forms are the method's; the first is the one its example circuit
// draws and is the default here.
//
// Interface: combinational; z_i is Z(i) = ~(a_i | b_i), named K in the
// circuit this follows. c_sel is the carry into bit i for FINE_EQN7 = 0 and
// the carry into bit i-1 for FINE_EQN7 = 1.
module lop_dist_cell #(
  parameter bit FINE_EQN7 = 1'b0
) (
  input  logic a_i,
  input  logic b_i,
  input  logic t_im1,   // T(i-1)
  input  logic t_im2,   // T(i-2)
  input  logic a_im1,   // A(i-1)
  input  logic c_sel,   // C(i), or C(i-1) when FINE_EQN7
  input  logic f_in,
  output logic t_i,
  output logic u_i,
  output logic l_i,
  output logic e_i
);

  logic g_i, z_i, x, cfine;

  assign g_i   = a_i & b_i;
  assign z_i   = ~(a_i | b_i);
  assign t_i   = a_i ^ b_i;
  assign x     = t_im2 ^ a_im1;
  assign u_i   = t_im1 | (~t_im1 & ((~x & z_i) | (x & g_i)));
  assign l_i   = f_in & ~u_i;
  if (FINE_EQN7) begin : g_eqn7
    assign cfine = ~c_sel ^ x;
  end else begin : g_eqn6
    assign cfine = t_i & (c_sel ^ ~x);
  end
  assign e_i   = l_i & ~cfine;

endmodule
