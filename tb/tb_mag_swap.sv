// tb_mag_swap: self-checking test of the magnitude comparator and swapper at
// its default width: random pairs, pairs differing only in low bits, and
// equal pairs; larger/smaller/swapped are compared with integer comparison.
module tb_mag_swap;
  import lop_ref_pkg::*;

  localparam int N = 54;

  logic [0:N-1] x, y, larger, smaller;
  logic         swapped;

  int checks = 0;
  int failures = 0;
  int n_sw = 0, n_eq = 0;

  mag_swap dut (.x(x), .y(y), .larger(larger), .smaller(smaller), .swapped(swapped));

  initial begin
    longint unsigned vx, vy, hi, lo;
    for (int v = 0; v < 20000; v++) begin
      vx = {$urandom(), $urandom()} & mask(N);
      case (v % 3)
        0: vy = {$urandom(), $urandom()} & mask(N);
        1: vy = vx ^ ({$urandom(), $urandom()} & mask($urandom_range(N)));
        default: vy = vx;
      endcase
      x = vx[N-1:0]; y = vy[N-1:0];
      #1;
      hi = (vy > vx) ? vy : vx;
      lo = (vy > vx) ? vx : vy;
      checks++;
      if (swapped != (vy > vx) || larger != hi[N-1:0] || smaller != lo[N-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h", vx, vy);
      end
      if (swapped) n_sw++;
      if (vx == vy) n_eq++;
    end
    checks++;
    if (n_sw == 0 || n_eq == 0) begin failures++; $display("FAIL swap or equal case never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
