// N-digit carry-free quaternary signed digit (QSD) adder.
//
// Every digit position i has a level-1 generator that turns a[i] + b[i] into
// an intermediate carry c[i] and an intermediate sum t[i]. Position 0's sum
// is the result digit s[0] directly. For i >= 1 a level-2 adder adds c[i-1]
// to t[i] to give s[i]. The carry of the top position, c[N-1], is brought out
// as cout, the (N+1)-th result digit. No carry travels further than one
// position, so the delay does not grow with N. This arrangement (N
// generators, N-1 level-2 adders, N+1 result digits) follows the source
// description.
//
// Value: sum(s[i]*4^i) + cout*4^N = sum(a[i]*4^i) + sum(b[i]*4^i).
//
// Parameters: N  number of digits per operand (4 in the source)
// Ports: a, b  operands, N QSD digits each, digit 0 least significant
//        s     result digits 0..N-1
//        cout  result digit N, -1..+1, 2-bit two's complement
// Timing: purely combinational, two digit cells deep.
module qsd_adder
  import qsd_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  qsd_digit_t [N-1:0] a,
  input  qsd_digit_t [N-1:0] b,
  output qsd_digit_t [N-1:0] s,
  output qsd_carry_t         cout
);

  qsd_carry_t [N-1:0] c_int;  // intermediate carries
  qsd_digit_t [N-1:0] s_int;  // intermediate sums

  for (genvar i = 0; i < N; i++) begin : g_digit
    qsd_sum_carry_gen u_gen (
      .p(a[i]),
      .q(b[i]),
      .c(c_int[i]),
      .s(s_int[i])
    );
    if (i == 0) begin : g_lsd
      assign s[0] = s_int[0];
    end else begin : g_l2
      qsd_level2_adder u_l2 (
        .p(c_int[i-1]),
        .q(s_int[i]),
        .s(s[i])
      );
    end
  end

  assign cout = c_int[N-1];

endmodule
