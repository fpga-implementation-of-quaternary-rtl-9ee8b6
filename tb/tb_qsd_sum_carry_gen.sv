// Self-checking testbench of the level-1 QSD sum/carry generator.
// Drives all 49 pairs of QSD digits and checks the carry and sum codes
// against the recoding table (carry -1 for sums -6..-3, 0 for -2..+2, +1 for
// +3..+6; sum = raw sum - 4*carry).
module tb_qsd_sum_carry_gen;
  import qsd_ref_pkg::*;

  logic [2:0] p, q, s;
  logic [1:0] c;
  int checks = 0, failures = 0;

  qsd_sum_carry_gen dut (.p(p), .q(q), .c(c), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -3; x <= 3; x++) begin
      for (int y = -3; y <= 3; y++) begin
        int t, ce, se;
        p = dcode(x);
        q = dcode(y);
        #1;
        t  = x + y;
        ce = RECODE_CARRY[t + 6];
        se = t - 4 * ce;
        checks++;
        if (cval(c) != ce || dval(s) != se) begin
          failures++;
          $display("FAIL %0d + %0d: got c=%b s=%b, want c=%0d s=%0d", x, y, c, s, ce, se);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
