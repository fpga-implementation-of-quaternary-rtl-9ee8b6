// N-digit QSD subtractor: d = a - b.
//
// A negative QSD number is the digit-wise QSD complement of the positive one
// (every digit changes sign), so the subtractor complements each digit of b
// and feeds the result, with a, to its own N-digit carry-free adder. The
// result has N+1 digits like the adder's. Subtraction through digit-wise
// negation follows the source's definition of the QSD complement; the
// source names the subtractor but does not draw it, so the structure
// (negation in front of a separate adder) is this design's own reading.
//
// Parameters: N  number of digits per operand (4 in the source)
// Ports: a, b  operands, N QSD digits each, digit 0 least significant
//        d     difference digits 0..N-1
//        dout  difference digit N, -1..+1, 2-bit two's complement
// Timing: purely combinational, one negation and two digit cells deep.
module qsd_subtractor
  import qsd_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  qsd_digit_t [N-1:0] a,
  input  qsd_digit_t [N-1:0] b,
  output qsd_digit_t [N-1:0] d,
  output qsd_carry_t         dout
);

  qsd_digit_t [N-1:0] b_neg;

  always_comb begin
    for (int i = 0; i < N; i++) b_neg[i] = qsd_negate(b[i]);
  end

  qsd_adder #(.N(N)) u_add (
    .a   (a),
    .b   (b_neg),
    .s   (d),
    .cout(dout)
  );

endmodule
