// Level-2 cell of the carry-free QSD adder.
//
// Adds the intermediate carry p (-1..+1) that comes up from the next lower
// digit position to this position's intermediate sum q (-2..+2). The result
// is always within -3..+3, so it is one QSD digit and no further carry
// arises. The source description gives the cell as a truth table with five
// input bits and three output bits; here it is written as a 3-bit adder with
// the carry sign-extended, which gives the same table.
//
// Ports: p  intermediate carry in, 2-bit two's complement
//        q  intermediate sum in, 3-bit two's complement
//        s  final QSD digit out, 3-bit two's complement
// Timing: purely combinational.
module qsd_level2_adder
  import qsd_pkg::*;
(
  input  qsd_carry_t p,
  input  qsd_digit_t q,
  output qsd_digit_t s
);

  always_comb s = 3'(p) + q;

endmodule
