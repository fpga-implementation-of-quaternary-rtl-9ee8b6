// Quaternary signed digit (QSD) arithmetic and logic unit.
//
// Two N-digit operands go to four units side by side: a carry-free QSD
// adder, a QSD subtractor, and a quaternary logic unit giving INVERT, MAX
// and MIN. A 3-bit opcode selects which result appears at the output:
//   000 a + b     001 a - b     010 INVERT a     011 MAX(a,b)     100 MIN(a,b)
// The opcode values, the units and the 4-digit default size follow the
// source description.
//
// This design's own choices: the logic operations read the two low bits of
// each 3-bit digit field as the quaternary logic level, so the QSD digits
// 0..3 (000..011) are the levels 0..3; a logic result is returned as the
// non-negative QSD digits 0..3 with cout = 0; the unused opcodes 101..111
// return all zeros.
//
// Parameters: N  number of digits per operand (4 in the source)
// Ports: op    opcode, see qsd_pkg::qsd_op_e
//        a, b  operands, N QSD digits each, 3-bit two's complement, digit 0
//              least significant
//        y     result digits 0..N-1
//        cout  result digit N (-1..+1) of an addition or subtraction
// Timing: purely combinational; there is no clock and no state.
module qsd_alu
  import qsd_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [2:0]         op,
  input  qsd_digit_t [N-1:0] a,
  input  qsd_digit_t [N-1:0] b,
  output qsd_digit_t [N-1:0] y,
  output qsd_carry_t         cout
);

  qsd_digit_t [N-1:0] sum, diff;
  qsd_carry_t         sum_c, diff_c;
  qlevel_t    [N-1:0] la, lb, l_inv, l_max, l_min;

  qsd_adder #(.N(N)) u_adder (
    .a   (a),
    .b   (b),
    .s   (sum),
    .cout(sum_c)
  );

  qsd_subtractor #(.N(N)) u_subtractor (
    .a   (a),
    .b   (b),
    .d   (diff),
    .dout(diff_c)
  );

  always_comb begin
    for (int i = 0; i < N; i++) begin
      la[i] = a[i][1:0];
      lb[i] = b[i][1:0];
    end
  end

  quaternary_logic_unit #(.N(N)) u_logic (
    .a     (la),
    .b     (lb),
    .inv_a (l_inv),
    .max_ab(l_max),
    .min_ab(l_min)
  );

  always_comb begin
    y    = '0;
    cout = '0;
    case (op)
      OP_ADD: begin
        y    = sum;
        cout = sum_c;
      end
      OP_SUB: begin
        y    = diff;
        cout = diff_c;
      end
      OP_INV: for (int i = 0; i < N; i++) y[i] = {1'b0, l_inv[i]};
      OP_MAX: for (int i = 0; i < N; i++) y[i] = {1'b0, l_max[i]};
      OP_MIN: for (int i = 0; i < N; i++) y[i] = {1'b0, l_min[i]};
      default: ;
    endcase
  end

endmodule
