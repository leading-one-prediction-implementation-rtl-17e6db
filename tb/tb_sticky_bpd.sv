// tb_sticky_bpd: self-checking test of the sticky-bit unit at its default
// multiplier width. The sum and carry vectors are built as a carry-save pair
// of a chosen low product value p: s is random and c = p - s, so s + c = p
// (mod 2^(N-1)) and the carry out is the overflow of s + c. p is zero in
// part of the cases (sticky 0, with carry out 0 or 1), a single low or high
// bit, or random. Expected values come from integer addition.
module tb_sticky_bpd;
  import lop_ref_pkg::*;

  localparam int N = 53;
  localparam int W = N - 1;
  localparam int NVEC = 20000;

  logic [0:W-1] s, c;
  logic         sticky, cout;

  int checks = 0;
  int failures = 0;
  int n_z = 0, n_tgz = 0, n_st = 0;

  sticky_bpd dut (.s(s), .c(c), .sticky(sticky), .cout(cout));

  initial begin
    longint unsigned p, vs, vc, tot;
    for (int v = 0; v < NVEC; v++) begin
      case (v % 5)
        0: p = 0;
        1: p = 64'd1 << $urandom_range(W - 1);
        2: p = {$urandom(), $urandom()} >> $urandom_range(63, 64 - W);
        default: p = {$urandom(), $urandom()} & mask(W);
      endcase
      if (v % 10 == 5) vs = 0;
      else vs = {$urandom(), $urandom()} & mask(W);
      vc = (p - vs) & mask(W);
      if (v % 5 == 4) vc = {$urandom(), $urandom()} & mask(W);
      s = vs[W-1:0]; c = vc[W-1:0];
      #1;
      tot = vs + vc;
      checks++;
      if (sticky != ((tot & mask(W)) != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL sticky s=%h c=%h got %0d", vs, vc, sticky);
      end
      checks++;
      if (cout != tot[W]) begin
        failures++;
        if (failures < 10) $display("FAIL cout s=%h c=%h got %0d", vs, vc, cout);
      end
      if (!sticky && !cout) n_z++;
      if (!sticky && cout) n_tgz++;
      if (sticky) n_st++;
    end
    checks++;
    if (n_z == 0 || n_tgz == 0 || n_st == 0) begin
      failures++; $display("FAIL a sticky case was never seen");
    end
    $display("zero/no carry:%0d zero/carry:%0d sticky:%0d", n_z, n_tgz, n_st);
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
