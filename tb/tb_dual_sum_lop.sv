// tb_dual_sum_lop: self-checking test of the compound-adder predictor at
// its default width.
// Each case is a subtraction x - (y + y_out/2) with random y_out: uniform
// pairs, near-cancelling pairs (long runs of zeros or ones) and pairs with
// the sign position clear as in an aligned significand subtraction. The
// reference is integer arithmetic one bit wider: the kept bits and the guard
// bit of (2x) - (2y + y_out), both compound sums, and the run of equal
// leading bits of the kept bits. x == y (difference 0) is excluded. The
// testbench also counts cases where the two sums have different leading
// runs, where reading the wrong carries would give a wrong count.
module tb_dual_sum_lop;
  import lop_ref_pkg::*;

  localparam int N  = 54;
  localparam int CW = $clog2(N + 1);

  logic [0:N-1]  x, y, sum0, sum1, diff;
  logic          y_out, guard, c_fine;
  logic [CW-1:0] shamt;

  int checks = 0;
  int failures = 0;
  int n_out0 = 0, n_out1 = 0, n_f0 = 0, n_f1 = 0, n_neg = 0, n_split = 0;

  dual_sum_lop dut (.x(x), .y(y), .y_out(y_out), .sum0(sum0), .sum1(sum1),
                    .diff(diff), .guard(guard), .c_fine(c_fine), .shamt(shamt));

  initial begin
    longint unsigned vx, vy, full, e0, e1, ed;
    bit yo;
    int run;
    for (int v = 0; v < 20000; v++) begin
      vx = {$urandom(), $urandom()} & mask(N);
      case (v % 3)
        0: vy = {$urandom(), $urandom()} & mask(N);
        1: vy = (vx + ({$urandom(), $urandom()} >> $urandom_range(63, 10))
                    - ({$urandom(), $urandom()} >> $urandom_range(63, 10))) & mask(N);
        default: begin
          vx = vx & mask(N - 1);
          vx[N-2] = 1'b1;
          vy = ({$urandom(), $urandom()} & mask(N - 1)) | (64'd1 << (N - 2));
          vy = vy >> $urandom_range(1);
        end
      endcase
      if (vx == vy) continue;
      yo = 1'($urandom_range(1));
      x = vx[N-1:0]; y = vy[N-1:0]; y_out = yo;
      #1;
      full = ((vx << 1) - ((vy << 1) | 64'(yo))) & mask(N + 1);
      e0 = (vx + (~vy & mask(N))) & mask(N);
      e1 = (e0 + 1) & mask(N);
      ed = full >> 1;
      run = run_len(ed, N);
      checks++;
      if (sum0 != e0[N-1:0] || sum1 != e1[N-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL sums x=%h y=%h got %h/%h", vx, vy, sum0, sum1);
      end
      checks++;
      if (diff != ed[N-1:0] || guard != full[0]) begin
        failures++;
        if (failures < 10) $display("FAIL diff x=%h y=%h yo=%0d got %h:%0d exp %h", vx, vy, yo, diff, guard, full);
      end
      checks++;
      if (int'(shamt) != run) begin
        failures++;
        if (failures < 10) $display("FAIL shamt x=%h y=%h yo=%0d got %0d exp %0d", vx, vy, yo, shamt, run);
      end
      if (yo) n_out1++; else n_out0++;
      if (c_fine) n_f1++; else n_f0++;
      if (ed[N-1]) n_neg++;
      if (run_len(e0, N) != run_len(e1, N)) n_split++;
    end
    checks++;
    if (n_out0 == 0 || n_out1 == 0 || n_f0 == 0 || n_f1 == 0 || n_neg == 0 || n_split == 0) begin
      failures++; $display("FAIL a case class was never seen");
    end
    $display("y_out 0/1:%0d/%0d fine 0/1:%0d/%0d negative:%0d sums differ in run:%0d",
             n_out0, n_out1, n_f0, n_f1, n_neg, n_split);
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
