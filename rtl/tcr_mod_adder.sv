// tcr_mod_adder: modulo-m adder for residues in (m-1)-bit thermometer code.
//
// A residue x (0 .. m-1) is W = m-1 bits wide with its x lowest bits set, so
// no carry chain is needed. The adder works in four steps:
//   1. V is bit-reversed, moving its ones to the top of the word.
//   2. U is ORed and XORed with the reversed V, bit by bit.
//   3. tcr_case_detect sorts the addition into four outcomes:
//        U+V <  m-1 : the OR vector has zeros where neither operand has a one.
//                     The XOR vector reads 1..1 (v) 0..0 1..1 (u); rotating
//                     it left by V gathers the ones at the bottom, giving the
//                     thermometer code of U+V.
//        U+V == m-1 : every XOR bit is 1, which is already the answer m-1.
//        U+V == m   : exactly one XOR bit is 0; the answer is 0.
//        U+V >  m   : z = U+V-(m-1) XOR bits are 0. The complemented XOR
//                     word, rotated left by V, is z ones at the bottom; one of
//                     them is dropped (shift right by one), leaving the code
//                     of z-1 = (U+V) mod m.
//   4. A four-way select picks the result by outcome.
// Steps 1-4 and the four outcomes follow the original description. Sharing one rotator
// between the "< m-1" and "> m" outcomes, and the shift that drops one bit in
// the last outcome, are this design's construction of "(M+1) zeros followed
// by (N-1) ones", where the complemented XOR word has M zeros and N ones.
// The sum_case output, which reports the outcome, is an addition of this
// design; the original adder has only the sum.
//
// Operands must be valid thermometer codes; other words give undefined sums.
//
// Interface: u, v (W bits, thermometer code), sum (W bits, thermometer code of
// (u+v) mod MOD), sum_case (outcome). Parameter MOD is the modulus m (>= 2);
// the original worked design is MOD = 7 with 6-bit operands.
// Timing: purely combinational, no clock and no registers.
module tcr_mod_adder
  import tcr_pkg::*;
#(
  parameter int unsigned MOD = 7
) (
  input  logic [MOD-2:0] u,
  input  logic [MOD-2:0] v,
  output logic [MOD-2:0] sum,
  output tcr_case_e      sum_case
);

  localparam int unsigned W = MOD - 1;

  logic [W-1:0] v_rev;
  logic [W-1:0] or_v;
  logic [W-1:0] xor_v;
  logic [W-1:0] xor_rot;

  // Step 1: bit reversal of V.
  always_comb begin
    for (int i = 0; i < W; i++) v_rev[i] = v[W-1-i];
  end

  // Step 2: bitwise OR and XOR.
  assign or_v  = u | v_rev;
  assign xor_v = u ^ v_rev;

  // Step 3: outcome of the addition.
  tcr_case_detect #(.W(W)) u_case (
    .or_v    (or_v),
    .xor_v   (xor_v),
    .sum_case(sum_case)
  );

  // Left rotation of the XOR word by V places.
  tcr_rotl #(.W(W)) u_rotl (
    .din (xor_v),
    .amt (v),
    .dout(xor_rot)
  );

  // Step 4: result select.
  always_comb begin
    unique case (sum_case)
      SUM_LT_M1: sum = xor_rot;
      SUM_EQ_M1: sum = xor_v;
      SUM_EQ_M:  sum = '0;
      SUM_GT_M:  sum = (~xor_rot) >> 1;
      default:   sum = '0;
    endcase
  end

endmodule
