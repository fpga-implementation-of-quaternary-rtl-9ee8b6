// Self-checking testbench of the level-2 QSD adder cell.
// Drives every carry (-1..+1) with every intermediate sum (-2..+2), the 15
// combinations the cell can see, and checks the output digit code.
module tb_qsd_level2_adder;
  import qsd_ref_pkg::*;

  logic [1:0] p;
  logic [2:0] q, s;
  int checks = 0, failures = 0;

  qsd_level2_adder dut (.p(p), .q(q), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -1; x <= 1; x++) begin
      for (int y = -2; y <= 2; y++) begin
        p = (x == -1) ? 2'b11 : 2'(x);
        q = dcode(y);
        #1;
        checks++;
        if (s !== dcode(x + y)) begin
          failures++;
          $display("FAIL carry %0d + sum %0d: got %b, want %0d", x, y, s, x + y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
