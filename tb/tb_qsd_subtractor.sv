// Self-checking testbench of the N-digit QSD subtractor.
// A 2-digit instance is driven with all 7^4 operand pairs and a 4-digit
// instance (the default size) with corner cases and random operands. Every
// result digit and the top digit are compared with a digit-level model of
// the two-level carry-free scheme, and the value of the result with the
// integer a - b. Each result digit must be a valid digit code.
module tb_qsd_subtractor;
  import qsd_ref_pkg::*;

  localparam int NRAND = 200000;

  logic [5:0]  a2, b2, r2;
  logic [1:0]  c2;
  logic [11:0] a4, b4, r4;
  logic [1:0]  c4;
  int checks = 0, failures = 0;
  int top_nonzero = 0;

  qsd_subtractor #(.N(2)) dut2 (.a(a2), .b(b2), .d(r2), .dout(c2));
  qsd_subtractor dut4 (.a(a4), .b(b4), .d(r4), .dout(c4));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int n, input digits_t x, input digits_t y,
                       input logic [11:0] r, input logic [1:0] co);
    digits_t yy, e, got;
    int ec, bad;
    for (int i = 0; i < 8; i++) yy[i] = -y[i];
    ref_add(x, yy, n, e, ec);
    bad = 0;
    for (int i = 0; i < n; i++) begin
      got[i] = dval(r[3*i +: 3]);
      if (got[i] != e[i]) bad = 1;
    end
    if (cval(co) != ec) bad = 1;
    checks++;
    if (cval(co) != 0) top_nonzero++;
    if (bad == 0 && value(got, n) + cval(co) * pow4(n) != value(x, n) - value(y, n)) bad = 1;
    if (bad != 0) begin
      failures++;
      if (failures < 10)
        $display("FAIL n=%0d a=%0d b=%0d: got %h top %b", n, value(x, n), value(y, n), r, co);
    end
  endtask

  task automatic apply4(input digits_t x, input digits_t y);
    for (int i = 0; i < 4; i++) begin
      a4[3*i +: 3] = dcode(x[i]);
      b4[3*i +: 3] = dcode(y[i]);
    end
    #1;
    check(4, x, y, {r4}, c4);
  endtask

  initial begin
    digits_t x, y;
    x = '{default: 0};
    y = '{default: 0};
    // exhaustive, 2 digits
    for (int i = 0; i < 7 * 7 * 7 * 7; i++) begin
      x[0] = i % 7 - 3;
      x[1] = (i / 7) % 7 - 3;
      y[0] = (i / 49) % 7 - 3;
      y[1] = (i / 343) % 7 - 3;
      a2 = {dcode(x[1]), dcode(x[0])};
      b2 = {dcode(y[1]), dcode(y[0])};
      #1;
      check(2, x, y, {6'b0, r2}, c2);
    end
    // corners, 4 digits: all 3s (255) and all -3s against each other
    for (int i = 0; i < 4; i++) x[i] = 3;
    for (int i = 0; i < 4; i++) y[i] = 3;
    apply4(x, y);
    for (int i = 0; i < 4; i++) y[i] = -3;
    apply4(x, y);
    for (int i = 0; i < 4; i++) x[i] = -3;
    apply4(x, y);
    // random, 4 digits
    for (int k = 0; k < NRAND; k++) begin
      for (int i = 0; i < 4; i++) begin
        x[i] = random_digit();
        y[i] = random_digit();
      end
      apply4(x, y);
    end
    if (top_nonzero == 0) begin
      failures++;
      $display("FAIL: top result digit never non-zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
