// Self-checking testbench of the quaternary logic unit.
// All 4^8 pairs of 4-digit operands are applied; every digit of the three
// outputs is compared with the INVERT, MAX and MIN truth tables written out
// as constant tables.
module tb_quaternary_logic_unit;

  // truth tables, indexed [p][q]
  localparam logic [1:0] INV_T[4]    = '{2'd3, 2'd2, 2'd1, 2'd0};
  localparam logic [1:0] MAX_T[4][4] = '{'{0, 1, 2, 3}, '{1, 1, 2, 3}, '{2, 2, 2, 3}, '{3, 3, 3, 3}};
  localparam logic [1:0] MIN_T[4][4] = '{'{0, 0, 0, 0}, '{0, 1, 1, 1}, '{0, 1, 2, 2}, '{0, 1, 2, 3}};

  logic [7:0] a, b, inv_a, max_ab, min_ab;
  int checks = 0, failures = 0;

  quaternary_logic_unit dut (.a(a), .b(b), .inv_a(inv_a), .max_ab(max_ab), .min_ab(min_ab));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 65536; k++) begin
      a = k[7:0];
      b = k[15:8];
      #1;
      for (int i = 0; i < 4; i++) begin
        logic [1:0] da, db;
        da = a[2*i +: 2];
        db = b[2*i +: 2];
        checks++;
        if (inv_a[2*i +: 2] != INV_T[da] || max_ab[2*i +: 2] != MAX_T[da][db] ||
            min_ab[2*i +: 2] != MIN_T[da][db]) begin
          failures++;
          if (failures < 10)
            $display("FAIL digit %0d a=%0d b=%0d: inv %0d max %0d min %0d", i, da, db,
                     inv_a[2*i +: 2], max_ab[2*i +: 2], min_ab[2*i +: 2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
