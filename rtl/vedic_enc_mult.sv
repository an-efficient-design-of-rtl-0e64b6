// vedic_enc_mult: N x N unsigned multiplier with 2-bit multiplier encoding.
//
// An ordinary Vedic (vertical-and-crosswise) multiplier forms one
// partial-product row per multiplier bit. Here the multiplier is read two
// bits at a time, so only N/2 rows are formed (4 instead of 8 for N = 8):
//   1. vedic_new_encoder turns each 2-bit digit i of the multiplier into a
//      row of 0, 1, 2 or 3 times the multiplicand (N+2 bits);
//   2. row 0 goes to the adder as it is, and row i (i >= 1) is shifted left
//      by 2i bits (by 2, 4 and 6 bits for N = 8);
//   3. vedic_column_adder adds the aligned rows into the 2N-bit product.
// No partial products are formed by AND gates: the only arithmetic is the
// 3x adder inside each row encoder and the final adder.
//
// Interface: purely combinational, no clock or reset; `product` is valid one
// propagation delay after the operands change. Both operands are unsigned.
// `codes` brings out the digit codes A_i chosen for the current multiplier.
//
// The encoder / shifters / adder structure, the shift amounts and the 16-bit
// product width for N = 8 follow the method. The generalisation to any even
// N, the parallel encoder bank and the column-wise adder are this design's
// choices.
module vedic_enc_mult
  import vedic_enc_pkg::*;
#(
  parameter int unsigned N = 8  // operand width, even
) (
  input  logic [N-1:0]   multiplicand,
  input  logic [N-1:0]   multiplier,
  output logic [2*N-1:0] product,
  output code_t [N/2-1:0] codes        // digit codes A_i, for observation
);

  localparam int unsigned GROUP_BITS = 2;  // multiplier bits per digit

  localparam int unsigned ROWS = N / GROUP_BITS;

  logic  [ROWS-1:0][N+1:0]   rows;
  logic  [ROWS-1:0][2*N-1:0] aligned;

  vedic_new_encoder #(.N(N)) u_encoder (
    .multiplicand (multiplicand),
    .multiplier   (multiplier),
    .codes        (codes),
    .rows         (rows)
  );

  // Shifters: row i moves left by 2i bits. The top row's N+2 bits end
  // exactly at bit 2N-1, so no bit is dropped.
  always_comb begin
    for (int i = 0; i < ROWS; i++) begin
      aligned[i] = (2 * N)'(rows[i]) << (GROUP_BITS * i);
    end
  end

  vedic_column_adder #(.ROWS(ROWS), .W(2 * N)) u_adder (
    .ops (aligned),
    .y   (product)
  );

endmodule
