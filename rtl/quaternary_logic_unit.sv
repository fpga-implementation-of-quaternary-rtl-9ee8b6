// Quaternary logic unit: digit-wise INVERT, MAX and MIN.
//
// Each operand is N quaternary logic levels 0..3 held as 2-bit numbers. For
// every digit the unit forms
//   inv_a = 3 - a   (the quaternary inverter, 00<->11, 01<->10)
//   max_ab = the larger of a and b (the quaternary OR)
//   min_ab = the smaller of a and b (the quaternary AND)
// which are the three truth tables of the source description. All three are
// produced at once; the ALU around it picks one. The inverter acting on
// operand a alone is this design's own choice: the source gives it as a
// one-input function without saying which operand it takes.
//
// Parameters: N  number of digits (4 in the source)
// Ports: a, b    operands, N levels each, digit 0 least significant
//        inv_a, max_ab, min_ab  results, N levels each
// Timing: purely combinational.
module quaternary_logic_unit
  import qsd_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  qlevel_t [N-1:0] a,
  input  qlevel_t [N-1:0] b,
  output qlevel_t [N-1:0] inv_a,
  output qlevel_t [N-1:0] max_ab,
  output qlevel_t [N-1:0] min_ab
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      inv_a[i]  = ~a[i];
      max_ab[i] = (a[i] > b[i]) ? a[i] : b[i];
      min_ab[i] = (a[i] < b[i]) ? a[i] : b[i];
    end
  end

endmodule
