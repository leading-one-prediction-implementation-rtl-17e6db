// tb_ones_comp_adder: self-checking test of the one's-complement adder used
// for magnitude subtraction. For magnitudes x and y (N-1 bits) it feeds
// a = {0,x} and b = ~{0,y} and checks the end-around carry (set exactly when
// x > y), the sign, the magnitude |x - y| and the raw sum, plus every bit's
// carry against integer addition with the end-around carry as carry in.
module tb_ones_comp_adder;
  import lop_ref_pkg::*;

  localparam int N = 54;
  localparam int NVEC = 20000;

  logic [0:N-1] a, b, sum, c, mag;
  logic         eac, neg;

  int checks = 0;
  int failures = 0;
  int n_eac = 0, n_neg = 0, n_zero = 0;

  ones_comp_adder dut (.a(a), .b(b), .sum(sum), .c(c), .eac(eac), .neg(neg), .mag(mag));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h", what, a, b);
    end
  endtask

  initial begin
    longint unsigned x, y, va, vb, diff, raw;
    bit ok;
    for (int v = 0; v < NVEC; v++) begin
      x = {$urandom(), $urandom()} & mask(N - 1);
      case (v % 4)
        0: y = {$urandom(), $urandom()} & mask(N - 1);
        1: y = (x + ({$urandom(), $urandom()} >> $urandom_range(63, 10))) & mask(N - 1);
        2: y = (x - ({$urandom(), $urandom()} >> $urandom_range(63, 10))) & mask(N - 1);
        default: y = x;
      endcase
      va = x;
      vb = ~y & mask(N);
      a = va[N-1:0]; b = vb[N-1:0];
      #1;
      diff = (x > y) ? x - y : y - x;
      raw  = (va + vb + 64'(x > y)) & mask(N);
      chk(eac == (x > y), "eac");
      chk(neg == (x <= y), "neg");
      chk(mag == diff[N-1:0], "mag");
      chk(sum == raw[N-1:0], "sum");
      ok = 1;
      for (int i = 0; i < N; i++) if (c[i] != carry_into(va, vb, x > y, N, i)) ok = 0;
      chk(ok, "carries");
      if (eac) n_eac++;
      if (neg) n_neg++;
      if (x == y) n_zero++;
    end
    checks++;
    if (n_eac == 0 || n_neg == 0 || n_zero == 0) begin
      failures++; $display("FAIL end-around carry, negative or zero case never seen");
    end
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
