// vedic_row_encoder: one partial-product row of the encoded Vedic multiplier.
//
// Takes the N-bit multiplicand and two multiplier bits {b(i+1), b(i)}. The two
// bits are mapped to a code A_i (0..3, as in the encoding table) and the code
// picks the row:
//   A_i = 0 -> 0
//   A_i = 1 -> multiplicand
//   A_i = 2 -> multiplicand shifted left by one position
//   A_i = 3 -> (multiplicand) + (multiplicand << 1), i.e. the sum of the
//              code-1 and code-2 rows
// The row is N+2 bits wide, the width of 3 x (2^N - 1), so nothing is lost;
// for N = 8 the encoder thus has 2 + 8 inputs and 10 row outputs. The
// 3x sum is a ripple-carry chain of full adders, one per bit;
// the 0/1x/2x/3x choice is a 4-way multiplexer.
//
// Interface: purely combinational, no clock or reset. `code` is the
// code of `bits`, `row` is code x multiplicand.
//
// The code table, the four row choices and "code 3 = sum of the code-1 and
// code-2 rows" follow the method. The ripple-carry structure of the 3x adder
// and the output width of N+2 bits are this design's choices.
module vedic_row_encoder
  import vedic_enc_pkg::*;
#(
  parameter int unsigned N = 8  // multiplicand width
) (
  input  logic [N-1:0] multiplicand,
  input  logic [1:0]   bits,        // {b(i+1), b(i)}
  output code_t        code,        // A_i
  output logic [N+1:0] row          // A_i x multiplicand
);

  logic [N+1:0] m_x1;     // code-1 row
  logic [N+1:0] m_x2;     // code-2 row
  logic [N+1:0] m_x3;     // code-3 row: m_x1 + m_x2
  logic [N+2:0] carry;    // ripple carries of the 3x adder

  // Encoding table: the 2-bit group read as a binary number.
  assign code = code_t'(bits);

  assign m_x1 = {2'b00, multiplicand};
  assign m_x2 = {1'b0, multiplicand, 1'b0};

  // Ripple-carry adder m_x1 + m_x2, one full adder per bit. The final carry
  // is always 0, since 3 x (2^N - 1) fits in N+2 bits.
  assign carry[0] = 1'b0;
  for (genvar k = 0; k < N + 2; k++) begin : g_fa
    assign m_x3[k]      = m_x1[k] ^ m_x2[k] ^ carry[k];
    assign carry[k + 1] = (m_x1[k] & m_x2[k]) | (carry[k] & (m_x1[k] ^ m_x2[k]));
  end

  // 3 x (2^N - 1) < 2^(N+2): the 3x adder never carries out.
  always_comb begin
    assert (carry[N + 2] == 1'b0)
      else $error("vedic_row_encoder: 3x adder overflow");
  end

  always_comb begin
    unique case (code)
      CODE_ZERO:  row = '0;
      CODE_ONE:   row = m_x1;
      CODE_TWO:   row = m_x2;
      CODE_THREE: row = m_x3;
      default:    row = '0;
    endcase
  end

endmodule
