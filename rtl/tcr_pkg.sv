// tcr_pkg: types shared by the thermometer-coded residue (TCR) modulo adder.
//
// A residue x of modulus m is carried as an (m-1)-bit thermometer code whose
// x lowest bits are 1 and the rest 0 (x = 0 .. m-1). The adder sorts every
// addition into one of four outcomes, named by tcr_case_e; the four follow the
// decision steps of the adder's flow: overlapping zeros, all XOR bits one,
// exactly one XOR bit zero, and the rest. The enum encoding is this design's
// own choice.
package tcr_pkg;

  typedef enum logic [1:0] {
    SUM_LT_M1 = 2'd0,  // U+V <  m-1 : OR vector has a zero (overlapping zeros)
    SUM_EQ_M1 = 2'd1,  // U+V == m-1 : every XOR bit is 1
    SUM_EQ_M  = 2'd2,  // U+V == m   : exactly one XOR bit is 0
    SUM_GT_M  = 2'd3   // U+V >  m   : two or more XOR bits are 0
  } tcr_case_e;

endpackage
