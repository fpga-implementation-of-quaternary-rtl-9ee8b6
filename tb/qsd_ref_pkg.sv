// Reference model shared by the QSD testbenches.
//
// Works in plain integers, independently of the RTL: digit codes are decoded
// by hand, and the level-1 recoding is the literal table of carry choices for
// the raw digit sums -6..+6 (c = -1 for -6..-3, 0 for -2..+2, +1 for +3..+6).
package qsd_ref_pkg;

  localparam int RECODE_CARRY[13] = '{-1, -1, -1, -1, 0, 0, 0, 0, 0, 1, 1, 1, 1};

  // value of a 3-bit digit code (100 returns 99: not a digit)
  function automatic int dval(logic [2:0] code);
    case (code)
      3'b000: return 0;
      3'b001: return 1;
      3'b010: return 2;
      3'b011: return 3;
      3'b101: return -3;
      3'b110: return -2;
      3'b111: return -1;
      default: return 99;
    endcase
  endfunction

  // value of a 2-bit carry code (10 returns 99: not a carry)
  function automatic int cval(logic [1:0] code);
    case (code)
      2'b00: return 0;
      2'b01: return 1;
      2'b11: return -1;
      default: return 99;
    endcase
  endfunction

  // code of a digit value -3..+3
  function automatic logic [2:0] dcode(int v);
    case (v)
      -3: return 3'b101;
      -2: return 3'b110;
      -1: return 3'b111;
      0:  return 3'b000;
      1:  return 3'b001;
      2:  return 3'b010;
      default: return 3'b011;
    endcase
  endfunction

  function automatic int random_digit();
    return int'($urandom_range(6)) - 3;
  endfunction

  function automatic int pow4(int k);
    int r = 1;
    for (int i = 0; i < k; i++) r *= 4;
    return r;
  endfunction

  // Digit-level result of the two-level carry-free addition of the n-digit
  // operands x and y (digit 0 least significant): result digits e[0..n-1] and
  // the top digit ecout.
  typedef int digits_t[8];

  function automatic void ref_add(input digits_t x, input digits_t y, input int n,
                                  output digits_t e, output int ecout);
    int c[8], s[8];
    e = '{default: 0};
    for (int i = 0; i < n; i++) begin
      c[i] = RECODE_CARRY[x[i] + y[i] + 6];
      s[i] = x[i] + y[i] - 4 * c[i];
    end
    for (int i = 0; i < n; i++) e[i] = (i == 0) ? s[0] : s[i] + c[i-1];
    ecout = c[n-1];
  endfunction

  function automatic int value(digits_t x, int n);
    int v = 0;
    for (int i = n - 1; i >= 0; i--) v = 4 * v + x[i];
    return v;
  endfunction

endpackage
