// tb_lop_pos: self-checking test of the positive-only leading-zero
// predictor at its default width. Each case is an unsigned subtraction
// x - y with x >= y, fed as a = x, b = ~y, carry in 1: uniform pairs, pairs
// with a small difference (long zero runs), pairs whose difference keeps the
// MSB set (already normalised) and pairs with x's MSB set and y's clear.
// The expected SH array comes from scanning the symbol string for T*GZ* and
// T*, the carries from integer addition, and the expected count from the
// leading zeros of x - y. Equal operands (result 0) are excluded.
module tb_lop_pos;
  import lop_ref_pkg::*;

  localparam int N  = 54;
  localparam int CW = $clog2(N + 1);

  logic [0:N-1]  a, b, c, sh;
  logic [CW-1:0] sh_coarse, sh_total;
  logic          c_fine;

  int checks = 0;
  int failures = 0;
  int n_f1 = 0, n_f0 = 0, n_norm = 0, n_big = 0;

  lop_pos dut (.a(a), .b(b), .c(c), .sh(sh), .sh_coarse(sh_coarse),
               .c_fine(c_fine), .sh_total(sh_total));

  // longest prefix matching T* or T*GZ*, scanned symbol by symbol
  function automatic int pos_len(input longint unsigned va, input longint unsigned vb);
    int k = 0;
    while (k < N && sym(va, vb, N, k) == SYM_T) k++;
    if (k == N) return N;
    if (sym(va, vb, N, k) != SYM_G) return k;
    k++;
    while (k < N && sym(va, vb, N, k) == SYM_Z) k++;
    return k;
  endfunction

  initial begin
    longint unsigned x, y, t, vb, d;
    int len, lz;
    bit ok;
    for (int v = 0; v < 20000; v++) begin
      x = {$urandom(), $urandom()} & mask(N);
      case (v % 4)
        0: y = {$urandom(), $urandom()} & mask(N);
        1: y = (x - ({$urandom(), $urandom()} >> $urandom_range(63, 10))) & mask(N);
        2: begin x[N-1] = 1'b1; y = {$urandom(), $urandom()} & mask(N - 2); end
        default: begin x[N-1] = 1'b1; y = {$urandom(), $urandom()} & mask(N - 1); end
      endcase
      if (y > x) begin t = x; x = y; y = t; end
      if (x == y) continue;
      vb = ~y & mask(N);
      a = x[N-1:0]; b = vb[N-1:0];
      for (int i = 0; i < N; i++) c[i] = carry_into(x, vb, 1'b1, N, i);
      #1;
      d   = x - y;
      lz  = lzc(d, N);
      len = pos_len(x, vb);
      ok = 1;
      for (int i = 0; i < N; i++) if (sh[i] != (i < len)) ok = 0;
      checks++;
      if (!ok) begin failures++; if (failures < 10) $display("FAIL sh x=%h y=%h", x, y); end
      checks++;
      if (int'(sh_coarse) != len) begin failures++; if (failures < 10) $display("FAIL coarse x=%h y=%h", x, y); end
      checks++;
      if (int'(sh_total) != lz) begin
        failures++;
        if (failures < 10) $display("FAIL total x=%h y=%h got %0d exp %0d", x, y, sh_total, lz);
      end
      if (c_fine) n_f1++; else n_f0++;
      if (lz == 0) n_norm++;
      if (lz >= N / 2) n_big++;
    end
    checks++;
    if (n_f1 == 0 || n_f0 == 0 || n_norm == 0 || n_big == 0) begin
      failures++; $display("FAIL a case class was never seen");
    end
    $display("fine 1/0:%0d/%0d already normalised:%0d long runs:%0d", n_f1, n_f0, n_norm, n_big);
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
