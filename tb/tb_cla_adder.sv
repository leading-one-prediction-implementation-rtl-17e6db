// tb_cla_adder: self-checking test of the 4-way carry-lookahead adder at its
// default width. Random operands, operands that propagate a carry over long
// distances (b close to ~a) and both carry-in values are checked against
// integer addition: sum, every bit's carry in, carry out and the
// carry-in-independent whole-word generate.
module tb_cla_adder;
  import lop_ref_pkg::*;

  localparam int N = 54;
  localparam int NVEC = 20000;

  logic [0:N-1] a, b, sum, c;
  logic         cin, cout, g_all;

  int checks = 0;
  int failures = 0;
  int n_long = 0;

  cla_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .c(c), .cout(cout), .g_all(g_all));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h cin=%0d", what, a, b, cin);
    end
  endtask

  initial begin
    longint unsigned va, vb, full;
    bit ci;
    bit ok;
    for (int v = 0; v < NVEC; v++) begin
      va = {$urandom(), $urandom()} & mask(N);
      vb = {$urandom(), $urandom()} & mask(N);
      if (v % 2 == 1) vb = (~va ^ (64'd1 << $urandom_range(N - 1))) & mask(N);
      ci = 1'($urandom_range(1));
      a = va[N-1:0]; b = vb[N-1:0]; cin = ci;
      #1;
      full = va + vb + 64'(ci);
      chk(sum == full[N-1:0], "sum");
      chk(cout == full[N], "cout");
      full = va + vb;
      chk(g_all == full[N], "g_all");
      ok = 1;
      for (int i = 0; i < N; i++) if (c[i] != carry_into(va, vb, ci, N, i)) ok = 0;
      chk(ok, "carries");
      if (c[0] && ((va ^ vb) >> 1) == (mask(N) >> 1)) n_long++;
    end
    checks++;
    if (n_long == 0) begin failures++; $display("FAIL no full-length carry seen"); end
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
