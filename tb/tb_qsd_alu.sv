// End-to-end self-checking testbench of the QSD ALU at its default size
// (4-digit operands).
//
// Every opcode is applied with random operands and with corner cases. For
// addition and subtraction each result digit and the top digit are compared
// with a digit-level model of the two-level carry-free scheme and the value
// with the integer sum or difference. For INVERT, MAX and MIN each digit is
// compared with 3 - a, max(a, b) and min(a, b) taken on the low two bits of
// each digit field; the unused opcodes must give zero. The test counts how
// often each mechanism occurred: each opcode, a carry absorbed by a level-2
// cell, a top result digit of +1 and of -1; one that never occurred counts
// as a failure.
module tb_qsd_alu;
  import qsd_ref_pkg::*;

  localparam int NRAND = 50000;
  localparam int N = 4;

  logic [2:0]     op;
  logic [3*N-1:0] a, b, y;
  logic [1:0]     cout;
  int checks = 0, failures = 0;
  int n_op[8];
  int n_absorbed = 0, n_top_pos = 0, n_top_neg = 0;

  qsd_alu dut (.op(op), .a(a), .b(b), .y(y), .cout(cout));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string what);
    failures++;
    if (failures < 10) $display("FAIL op=%b a=%h b=%h: %s (y=%h cout=%b)", op, a, b, what, y, cout);
  endtask

  task automatic run(input logic [2:0] opc, input digits_t x, input digits_t yv);
    digits_t yy, e, got;
    int ec;
    op = opc;
    for (int i = 0; i < N; i++) begin
      a[3*i +: 3] = dcode(x[i]);
      b[3*i +: 3] = dcode(yv[i]);
    end
    #1;
    checks++;
    n_op[opc]++;
    case (opc)
      3'b000, 3'b001: begin
        for (int i = 0; i < 8; i++) yy[i] = (opc == 3'b001) ? -yv[i] : yv[i];
        ref_add(x, yy, N, e, ec);
        for (int i = 0; i < N; i++) got[i] = dval(y[3*i +: 3]);
        for (int i = 0; i < N; i++) if (got[i] != e[i]) fail("digit mismatch");
        if (cval(cout) != ec) fail("top digit mismatch");
        if (value(got, N) + cval(cout) * pow4(N) != value(x, N) + value(yy, N)) fail("value mismatch");
        for (int i = 0; i + 1 < N; i++) if (x[i] + yy[i] >= 3 || x[i] + yy[i] <= -3) n_absorbed++;
        if (cval(cout) == 1) n_top_pos++;
        if (cval(cout) == -1) n_top_neg++;
      end
      3'b010, 3'b011, 3'b100: begin
        if (cout != 2'b00) fail("cout not zero");
        for (int i = 0; i < N; i++) begin
          int la, lb;
          logic [2:0] want;
          la = int'(a[3*i +: 2]);
          lb = int'(b[3*i +: 2]);
          want = 3'((opc == 3'b010) ? 3 - la : (opc == 3'b011) ? ((la > lb) ? la : lb)
                                                                  : ((la < lb) ? la : lb));
          if (y[3*i +: 3] != want) fail("logic digit mismatch");
        end
      end
      default: if (y != '0 || cout != '0) fail("unused opcode not zero");
    endcase
  endtask

  initial begin
    digits_t x, yv;
    x  = '{default: 0};
    yv = '{default: 0};
    // 3333 (= 255) plus itself, and minus itself
    for (int i = 0; i < N; i++) begin
      x[i]  = 3;
      yv[i] = 3;
    end
    run(3'b000, x, yv);
    checks++;
    if (value(x, N) != 255) fail("3333 is not 255");
    run(3'b001, x, yv);
    for (int i = 0; i < N; i++) yv[i] = -3;
    run(3'b000, x, yv);
    run(3'b001, x, yv);
    // quaternary levels 0..3 for the logic operations, all digits together
    for (int k = 0; k < 256; k++) begin
      for (int i = 0; i < N; i++) begin
        x[i]  = (k >> (i % 2 * 2)) & 3;
        yv[i] = (k >> 4 >> (i % 2 * 2)) & 3;
      end
      for (int opc = 2; opc <= 4; opc++) run(3'(opc), x, yv);
    end
    // random
    for (int k = 0; k < NRAND; k++) begin
      for (int i = 0; i < N; i++) begin
        x[i]  = random_digit();
        yv[i] = random_digit();
      end
      run(3'($urandom_range(7)), x, yv);
    end
    for (int opc = 0; opc < 8; opc++) begin
      $display("opcode %b applied %0d times", 3'(opc), n_op[opc]);
      if (n_op[opc] == 0) fail("opcode never applied");
    end
    $display("level-2 carry absorptions %0d, top digit +1 %0d, top digit -1 %0d",
             n_absorbed, n_top_pos, n_top_neg);
    if (n_absorbed == 0) fail("no carry absorbed");
    if (n_top_pos == 0) fail("top digit never +1");
    if (n_top_neg == 0) fail("top digit never -1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
