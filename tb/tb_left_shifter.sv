// tb_left_shifter: self-checking test of the normalising left shifter at its
// default width. Every shift amount from 0 to N, with and without the extra
// one-place fine stage, on random data, compared with a shift of a 64-bit
// integer.
module tb_left_shifter;
  import lop_ref_pkg::*;

  localparam int N  = 54;
  localparam int CW = $clog2(N + 1);

  logic [0:N-1]  d, q;
  logic [CW-1:0] shamt;
  logic          fine;

  int checks = 0;
  int failures = 0;

  left_shifter dut (.d(d), .shamt(shamt), .fine(fine), .q(q));

  initial begin
    longint unsigned vd, exp;
    int total;
    for (int rep = 0; rep < 40; rep++) begin
      for (int s = 0; s <= N; s++) begin
        for (int f = 0; f < 2; f++) begin
          vd = {$urandom(), $urandom()} & mask(N);
          d = vd[N-1:0]; shamt = CW'(s); fine = 1'(f);
          #1;
          total = s + f;
          exp = (total >= 64) ? 64'd0 : ((vd << total) & mask(N));
          checks++;
          if (q != exp[N-1:0]) begin
            failures++;
            if (failures < 10) $display("FAIL d=%h shamt=%0d fine=%0d q=%h", vd, s, f, q);
          end
        end
      end
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
