// left_shifter: normalising left shifter of the floating-point adder.
//
// Shifts the N-bit word left (towards bit 0, the MSB) by shamt + fine
// places, filling with zeros. It is a logarithmic barrel shifter: one stage
// per bit of shamt, each stage moving the word by a power of two, and a last
// one-place stage for fine. The separate fine input lets a predictor that
// under-counts by at most one (lop_dist) drive the coarse stages before its
// correction is known; a predictor that delivers the exact count drives
// shamt alone and ties fine to 0. Shift amounts of N or more give zero.
//
// Only the shifter's place in the datapath is given by the method; its
// barrel structure and the separate fine stage are this design's choices.
//
// Interface: purely combinational. Bit 0 is the MSB.
module left_shifter #(
  parameter int unsigned N = 54
) (
  input  logic [0:N-1]           d,
  input  logic [$clog2(N+1)-1:0] shamt,
  input  logic                   fine,
  output logic [0:N-1]           q
);

  localparam int SW = $clog2(N + 1);

  logic [0:N-1] stage [SW+1];

  assign stage[0] = d;
  for (genvar k = 0; k < SW; k++) begin : g_stage
    if ((1 << k) < N) begin : g_shift
      assign stage[k+1] = shamt[k] ? (stage[k] << (1 << k)) : stage[k];
    end else begin : g_clear
      assign stage[k+1] = shamt[k] ? '0 : stage[k];
    end
  end

  assign q = fine ? (stage[SW] << 1) : stage[SW];

endmodule
