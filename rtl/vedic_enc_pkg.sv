// vedic_enc_pkg: types shared by the encoded Vedic multiplier.
//
// The multiplier is cut into 2-bit groups starting at the LSB, and each group
// becomes a code A_i in 0..3 that selects what partial-product row the
// multiplicand contributes: nothing, itself, itself shifted left once, or the
// sum of those two (three times the multiplicand). The code values follow the
// encoding table of the method: the code is the group's binary value.
package vedic_enc_pkg;

  // Code A_i of one 2-bit multiplier group {b(i+1), b(i)}.
  typedef enum logic [1:0] {
    CODE_ZERO  = 2'd0,  // 00: row is zero
    CODE_ONE   = 2'd1,  // 01: row is the multiplicand
    CODE_TWO   = 2'd2,  // 10: row is the multiplicand shifted left by one
    CODE_THREE = 2'd3   // 11: row is the sum of the code-1 and code-2 rows
  } code_t;

endpackage
