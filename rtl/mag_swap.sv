// mag_swap: magnitude comparator and swapper in front of a subtractor, so
// that the smaller magnitude is always the one subtracted and the difference
// is never negative.
//
// larger gets the larger of x and y, smaller the other; swapped is set when y is
// larger, and is then the sign of x - y. With equal magnitudes no swap is
// made. The comparator is a plain unsigned comparison; its structure is left
// to synthesis.
//
// Interface: purely combinational; bit 0 is the MSB.
module mag_swap #(
  parameter int unsigned N = 54
) (
  input  logic [0:N-1] x,
  input  logic [0:N-1] y,
  output logic [0:N-1] larger,
  output logic [0:N-1] smaller,
  output logic         swapped
);

  assign swapped = y > x;
  assign larger  = swapped ? y : x;
  assign smaller = swapped ? x : y;

endmodule
