// tcr_case_detect: decide how U+V compares with the modulus m.
//
// Inputs are the bitwise OR and XOR of U with the bit-reversed V, both W = m-1
// bits wide. With U and V in thermometer code, U occupies the low bits and the
// reversed V the high bits, so:
//   - a 0 in the OR vector is a position where both are 0 (overlapping zeros),
//     which happens only when U+V < m-1;
//   - otherwise the XOR vector has one 0 for each position where both are 1,
//     i.e. U+V-(m-1) zeros: none means U+V = m-1, exactly one means U+V = m,
//     two or more mean U+V > m.
// The checks are taken in that order, as in the adder's flow of decisions.
// "Exactly one zero" is found with a running pair of flags (seen a zero, seen
// a second zero) along the vector, which is this design's own construction.
//
// Interface: or_v, xor_v (W bits each), sum_case (tcr_pkg::tcr_case_e).
// Timing: purely combinational.
module tcr_case_detect
  import tcr_pkg::*;
#(
  parameter int unsigned W = 6
) (
  input  logic [W-1:0] or_v,
  input  logic [W-1:0] xor_v,
  output tcr_case_e    sum_case
);

  logic any_overlap_zero;  // some OR output is 0
  logic zero_seen;         // at least one XOR output is 0
  logic zero_twice;        // at least two XOR outputs are 0

  always_comb begin
    any_overlap_zero = ~&or_v;
    zero_seen  = 1'b0;
    zero_twice = 1'b0;
    for (int i = 0; i < W; i++) begin
      zero_twice = zero_twice | (zero_seen & ~xor_v[i]);
      zero_seen  = zero_seen | ~xor_v[i];
    end
  end

  always_comb begin
    if (any_overlap_zero)  sum_case = SUM_LT_M1;
    else if (!zero_seen)   sum_case = SUM_EQ_M1;
    else if (!zero_twice)  sum_case = SUM_EQ_M;
    else                   sum_case = SUM_GT_M;
  end

endmodule
