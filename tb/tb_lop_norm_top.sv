// tb_lop_norm_top: end-to-end test of the cancellation paths and the sticky
// unit, with every parameter at its default (54-bit datapath, 53-bit
// multiplier).
// Magnitude pairs are uniform random, close to each other (differences of
// a few bits, massive cancellation), or equal. The expected sign and
// magnitude come from integer subtraction, the expected normalising shift
// from counting the leading zeros of the magnitude, and the expected
// normalised word from shifting it. The tree path, the distributed path and
// the compare-and-swap path must all agree with this. The sticky unit is
// driven with carry-save pairs of chosen low product values. The test also
// counts each mechanism of the design and fails if one never occurred:
// end-around carry, negative result, zero result, a swap, the fine
// correction of each predictor with both values, a shift of at least half
// the width, and the three sticky-unit outcomes. The compound-adder path
// gets a random shifted-out bit; its kept bits, guard bit and shift count
// are checked against ma - mb - mb_out/2 computed one bit wider, and both
// values of the shifted-out bit and of its correction must occur.
module tb_lop_norm_top;
  import lop_ref_pkg::*;

  localparam int N  = 54;
  localparam int NM = 53;
  localparam int W  = NM - 1;
  localparam int CW = $clog2(N + 1);
  localparam int NVEC = 20000;

  logic [0:N-2]  ma, mb;
  logic [0:N-1]  raw_sum, mag, sh, norm_tree, norm_dist;
  logic          eac, neg, fine_tree, fine_dist;
  logic [CW-1:0] coarse_tree, coarse_dist, shamt_tree, shamt_dist;
  logic [0:N]    l1hot;
  logic          swapped, fine_swap;
  logic [0:N-1]  diff_swap, norm_swap;
  logic [CW-1:0] shamt_swap;
  logic [0:W-1]  mul_s, mul_c;
  logic          sticky, mul_cout;
  logic          mb_out, dual_guard, fine_dual;
  logic [0:N-1]  dual_diff;
  logic [CW-1:0] dual_shamt;

  int checks = 0;
  int failures = 0;
  int n_eac = 0, n_neg = 0, n_zero = 0, n_ft1 = 0, n_ft0 = 0, n_fd1 = 0, n_fd0 = 0;
  int n_big = 0, n_st = 0, n_sz = 0, n_sc = 0, n_sw = 0, n_fs1 = 0, n_fs0 = 0;
  int n_mo1 = 0, n_mo0 = 0, n_fq1 = 0, n_fq0 = 0;

  lop_norm_top dut (
    .ma(ma), .mb(mb), .raw_sum(raw_sum), .eac(eac), .neg(neg), .mag(mag),
    .sh(sh), .coarse_tree(coarse_tree), .l1hot(l1hot), .coarse_dist(coarse_dist),
    .shamt_tree(shamt_tree), .norm_tree(norm_tree),
    .shamt_dist(shamt_dist), .norm_dist(norm_dist),
    .fine_tree(fine_tree), .fine_dist(fine_dist),
    .swapped(swapped), .diff_swap(diff_swap), .fine_swap(fine_swap),
    .shamt_swap(shamt_swap), .norm_swap(norm_swap),
    .mb_out(mb_out), .dual_diff(dual_diff), .dual_guard(dual_guard),
    .fine_dual(fine_dual), .dual_shamt(dual_shamt),
    .mul_s(mul_s), .mul_c(mul_c), .sticky(sticky), .mul_cout(mul_cout)
  );

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s ma=%h mb=%h", what, ma, mb);
    end
  endtask

  initial begin
    longint unsigned x, y, diff, nrm, p, vs, vc, tot, full;
    int lz;
    for (int v = 0; v < NVEC; v++) begin
      x = {$urandom(), $urandom()} & mask(N - 1);
      case (v % 5)
        0: y = {$urandom(), $urandom()} & mask(N - 1);
        1, 2: y = (x + ({$urandom(), $urandom()} >> $urandom_range(63, 12))) & mask(N - 1);
        3: y = (x - ({$urandom(), $urandom()} >> $urandom_range(63, 12))) & mask(N - 1);
        default: y = (v % 50 == 4) ? x : (x ^ (64'd1 << $urandom_range(N - 2)));
      endcase
      ma = x[N-2:0]; mb = y[N-2:0];
      mb_out = 1'($urandom_range(1));
      // multiplier low half as a carry-save pair of a chosen value
      case (v % 3)
        0: p = 0;
        1: p = 64'd1 << $urandom_range(W - 1);
        default: p = {$urandom(), $urandom()} & mask(W);
      endcase
      vs = (v % 6 == 0) ? 0 : ({$urandom(), $urandom()} & mask(W));
      vc = (p - vs) & mask(W);
      mul_s = vs[W-1:0]; mul_c = vc[W-1:0];
      #1;
      diff = (x > y) ? x - y : y - x;
      lz   = lzc(diff, N);
      nrm  = (lz >= N) ? 64'd0 : ((diff << lz) & mask(N));
      chk(neg == (x <= y), "sign");
      chk(mag == diff[N-1:0], "magnitude");
      chk(norm_tree == nrm[N-1:0], "normalised (tree)");
      chk(norm_dist == nrm[N-1:0], "normalised (distributed)");
      chk(swapped == (y > x), "swap");
      chk(diff_swap == diff[N-1:0], "difference (swap path)");
      chk(norm_swap == nrm[N-1:0], "normalised (swap path)");
      if (diff != 0) begin
        chk(int'(shamt_tree) == lz, "shift count (tree)");
        chk(int'(shamt_dist) == lz, "shift count (distributed)");
        chk(int'(shamt_swap) == lz, "shift count (swap path)");
        chk(norm_tree[0] == 1'b1, "leading one in bit 0");
      end
      full = ((x << 1) - ((y << 1) | 64'(mb_out))) & mask(N + 1);
      chk(dual_diff == full[N:1] && dual_guard == full[0], "difference (compound path)");
      if (x != y) chk(int'(dual_shamt) == run_len(full >> 1, N), "shift count (compound path)");
      if (mb_out) n_mo1++; else n_mo0++;
      if (x != y && fine_dual) n_fq1++;
      if (x != y && !fine_dual) n_fq0++;
      tot = vs + vc;
      chk(sticky == ((tot & mask(W)) != 0), "sticky");
      chk(mul_cout == tot[W], "multiplier carry out");
      if (eac) n_eac++;
      if (neg) n_neg++;
      if (diff == 0) n_zero++;
      if (diff != 0 && fine_tree) n_ft1++;
      if (diff != 0 && !fine_tree) n_ft0++;
      if (diff != 0 && fine_dist) n_fd1++;
      if (diff != 0 && !fine_dist) n_fd0++;
      if (diff != 0 && lz >= N / 2) n_big++;
      if (swapped) n_sw++;
      if (diff != 0 && fine_swap) n_fs1++;
      if (diff != 0 && !fine_swap) n_fs0++;
      if (sticky) n_st++;
      else if (mul_cout) n_sc++;
      else n_sz++;
    end
    checks++; if (n_eac == 0)  begin failures++; $display("FAIL end-around carry never seen"); end
    checks++; if (n_neg == 0)  begin failures++; $display("FAIL negative result never seen"); end
    checks++; if (n_zero == 0) begin failures++; $display("FAIL zero result never seen"); end
    checks++; if (n_ft1 == 0 || n_ft0 == 0) begin failures++; $display("FAIL tree fine correction not varied"); end
    checks++; if (n_fd1 == 0 || n_fd0 == 0) begin failures++; $display("FAIL distributed fine correction not varied"); end
    checks++; if (n_sw == 0)   begin failures++; $display("FAIL swap never seen"); end
    checks++; if (n_fs1 == 0 || n_fs0 == 0) begin failures++; $display("FAIL swap-path fine correction not varied"); end
    checks++; if (n_big == 0)  begin failures++; $display("FAIL massive cancellation never seen"); end
    checks++; if (n_mo1 == 0 || n_mo0 == 0 || n_fq1 == 0 || n_fq0 == 0) begin
      failures++; $display("FAIL compound path cases not varied"); end
    checks++; if (n_st == 0 || n_sz == 0 || n_sc == 0) begin failures++; $display("FAIL sticky outcome missing"); end
    $display("eac:%0d neg:%0d zero:%0d tree fine 1/0:%0d/%0d dist fine 1/0:%0d/%0d big shift:%0d",
             n_eac, n_neg, n_zero, n_ft1, n_ft0, n_fd1, n_fd0, n_big);
    $display("swaps:%0d swap-path fine 1/0:%0d/%0d", n_sw, n_fs1, n_fs0);
    $display("compound path: shifted-out bit 1/0:%0d/%0d fine 1/0:%0d/%0d", n_mo1, n_mo0, n_fq1, n_fq0);
    $display("sticky:%0d zero/no carry:%0d zero/carry:%0d", n_st, n_sz, n_sc);
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
