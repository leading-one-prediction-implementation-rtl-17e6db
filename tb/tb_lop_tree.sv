// tb_lop_tree: self-checking test of the 4-way tree leading-one predictor at
// its default width.
// Operand pairs come from four generators: uniform random, near-cancelling
// pairs whose sum is a small positive or negative number (long runs),
// strings built symbol by symbol from the four patterns with a random tail,
// and short-run strings beginning ZT or GT. For each pair the expected SH
// array comes from scanning the symbol string, the carries from integer
// addition of the low bits, and the expected count from the run of equal
// leading bits of the actual sum. The all-T string (a == ~b) is excluded.
// A second instance forms the correction from the global run kind
// (FINE_GLOBAL = 1) and must give the same correction and count.
module tb_lop_tree;
  import lop_ref_pkg::*;

  localparam int N  = 54;
  localparam int CW = $clog2(N + 1);
  localparam int NVEC = 20000;

  logic [0:N-1]  a, b, c;
  logic [0:N-1]  sh;
  logic [CW-1:0] sh_coarse, sh_total;
  logic          c_fine;
  logic [0:N-1]  sh_g;
  logic [CW-1:0] sh_coarse_g, sh_total_g;
  logic          c_fine_g;

  int checks = 0;
  int failures = 0;
  int n_fine1 = 0, n_fine0 = 0, n_full = 0, n_first1 = 0, n_neg = 0, n_pos = 0;

  lop_tree dut (.a(a), .b(b), .c(c), .sh(sh), .sh_coarse(sh_coarse),
                .c_fine(c_fine), .sh_total(sh_total));

  lop_tree #(.FINE_GLOBAL(1'b1)) dut_g (.a(a), .b(b), .c(c), .sh(sh_g), .sh_coarse(sh_coarse_g),
                                        .c_fine(c_fine_g), .sh_total(sh_total_g));

  function automatic longint unsigned rnd64();
    return {$urandom(), $urandom()};
  endfunction

  // build a symbol string: T^j, then G Z^k or Z G^k (or Z^k / G^k), random tail
  task automatic make_pattern(output longint unsigned va, output longint unsigned vb);
    int j, k, kind, i;
    int s;
    va = 0; vb = 0;
    kind = $urandom_range(3);
    j = (kind >= 2) ? 0 : $urandom_range(N - 1);
    k = $urandom_range(N);
    for (i = 0; i < N; i++) begin
      if (i < j) s = SYM_T;
      else if (i == j) s = (kind == 0 || kind == 2) ? SYM_G : SYM_Z;
      else if (i <= j + k) s = (kind == 0 || kind == 3) ? SYM_Z : SYM_G;
      else s = $urandom_range(2);
      case (s)
        SYM_T: if ($urandom_range(1) == 1) va[N-1-i] = 1'b1; else vb[N-1-i] = 1'b1;
        SYM_G: begin va[N-1-i] = 1'b1; vb[N-1-i] = 1'b1; end
        default: ;
      endcase
    end
  endtask

  task automatic check_one(input longint unsigned va, input longint unsigned vb, input bit cin);
    longint unsigned s;
    int len, run;
    bit ok;
    a = va[N-1:0];
    b = vb[N-1:0];
    for (int i = 0; i < N; i++) c[i] = carry_into(va, vb, cin, N, i);
    #1;
    s = (va + vb + 64'(cin)) & mask(N);
    len = match_len(va, vb, N);
    run = run_len(s, N);
    ok = 1;
    for (int i = 0; i < N; i++) if (sh[i] != (i < len)) ok = 0;
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL sh a=%h b=%h sh=%b len=%0d", va, vb, sh, len);
    end
    checks++;
    if (int'(sh_coarse) != len) begin
      failures++;
      if (failures < 10) $display("FAIL coarse a=%h b=%h got %0d exp %0d", va, vb, sh_coarse, len);
    end
    checks++;
    if (int'(sh_total) != run) begin
      failures++;
      if (failures < 10) $display("FAIL total a=%h b=%h cin=%0d got %0d exp %0d", va, vb, cin, sh_total, run);
    end
    checks++;
    if (sh_g != sh || c_fine_g != c_fine || sh_coarse_g != sh_coarse || sh_total_g != sh_total) begin
      failures++;
      if (failures < 10) $display("FAIL global form a=%h b=%h cin=%0d total %0d vs %0d fine %0d vs %0d",
                                  va, vb, cin, sh_total_g, sh_total, c_fine_g, c_fine);
    end
    if (c_fine) n_fine1++; else n_fine0++;
    if (len == N) n_full++;
    if (len == 1) n_first1++;
    if (s[N-1]) n_neg++; else n_pos++;
  endtask

  initial begin
    longint unsigned va, vb, d;
    bit cin;
    for (int v = 0; v < NVEC; v++) begin
      cin = 1'($urandom_range(1));
      case (v % 4)
        0: begin va = rnd64() & mask(N); vb = rnd64() & mask(N); end
        1: begin
          va = rnd64() & mask(N);
          d  = rnd64() >> $urandom_range(63, 64 - N);
          if ($urandom_range(1) == 1) d = -d;
          vb = (d - va - 64'(cin)) & mask(N);
        end
        2: make_pattern(va, vb);
        default: begin
          make_pattern(va, vb);
          va[N-1] = $urandom_range(1) == 1;
          vb[N-1] = va[N-1];
          va[N-2] = ~va[N-1] ^ ($urandom_range(1) == 1);
          vb[N-2] = ~va[N-2];
        end
      endcase
      if (((va ^ vb) & mask(N)) == mask(N)) continue;
      check_one(va, vb, cin);
    end
    // mechanisms that must have been exercised
    checks++; if (n_fine1 == 0)  begin failures++; $display("FAIL no fine correction seen"); end
    checks++; if (n_fine0 == 0)  begin failures++; $display("FAIL no uncorrected case seen"); end
    checks++; if (n_full == 0)   begin failures++; $display("FAIL no fully matching string seen"); end
    checks++; if (n_first1 == 0) begin failures++; $display("FAIL no run of one seen"); end
    checks++; if (n_neg == 0 || n_pos == 0) begin failures++; $display("FAIL sign not varied"); end
    $display("fine=1:%0d fine=0:%0d full:%0d run1:%0d neg:%0d pos:%0d",
             n_fine1, n_fine0, n_full, n_first1, n_neg, n_pos);
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
