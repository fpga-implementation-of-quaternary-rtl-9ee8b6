// Level-1 cell of the carry-free QSD adder: the QSD sum and intermediate
// carry generator of one digit position.
//
// The two input digits p and q (-3..+3 each) are added into a value t of
// -6..+6, which is then rewritten as t = 4*c + s with an intermediate carry c
// of -1..+1 and an intermediate sum s of -2..+2. Keeping |s| <= 2 and |c| <= 1
// is what lets the next level absorb the carry from below without producing a
// new one. Where two such splits exist (t = +-2) the one with c = 0 is taken:
// t >= 3 gives c = +1, t <= -3 gives c = -1, anything else gives c = 0. This
// is the recoding table of the source description; the cell computes it with
// a small adder and two comparisons instead of derived sum-of-products terms,
// which is this design's own choice.
//
// Ports: p, q  QSD digits in, 3-bit two's complement
//        c     intermediate carry out, 2-bit two's complement
//        s     intermediate sum out, 3-bit two's complement
// Timing: purely combinational.
module qsd_sum_carry_gen
  import qsd_pkg::*;
(
  input  qsd_digit_t p,
  input  qsd_digit_t q,
  output qsd_carry_t c,
  output qsd_digit_t s
);

  logic signed [3:0] t;  // raw digit sum, -6..+6

  always_comb begin
    t = 4'(p) + 4'(q);
    if (t >= 4'sd3) begin
      c = 2'sd1;
      s = 3'(t - 4'sd4);
    end else if (t <= -4'sd3) begin
      c = -2'sd1;
      s = 3'(t + 4'sd4);
    end else begin
      c = 2'sd0;
      s = 3'(t);
    end
  end

endmodule
