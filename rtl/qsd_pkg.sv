// Shared types and constants of the quaternary signed digit (QSD) ALU.
//
// A QSD digit takes one of the seven values -3..+3 and is held as a 3-bit
// two's complement number (-3 = 101, -2 = 110, -1 = 111, 0 = 000 ... 3 = 011);
// the pattern 100 (-4) is not a digit. An intermediate carry takes -1..+1 and is
// held as a 2-bit two's complement number (-1 = 11, 0 = 00, 1 = 01). A
// quaternary logic level is an unsigned 2-bit number 0..3. The encodings and the
// opcode values follow the source description; the helper functions are this
// design's own.
package qsd_pkg;

  typedef logic signed [2:0] qsd_digit_t;  // QSD digit, -3..+3
  typedef logic signed [1:0] qsd_carry_t;  // intermediate carry, -1..+1
  typedef logic        [1:0] qlevel_t;     // quaternary logic level, 0..3

  // ALU opcodes
  typedef enum logic [2:0] {
    OP_ADD = 3'b000,
    OP_SUB = 3'b001,
    OP_INV = 3'b010,
    OP_MAX = 3'b011,
    OP_MIN = 3'b100
  } qsd_op_e;

  // QSD complement of one digit: the digit with its sign changed. For -3..+3
  // the 3-bit two's complement negation never overflows.
  function automatic qsd_digit_t qsd_negate(qsd_digit_t d);
    return -d;
  endfunction

endpackage
