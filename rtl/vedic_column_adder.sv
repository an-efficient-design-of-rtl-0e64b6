// vedic_column_adder: multi-operand adder working column by column.
//
// Adds ROWS operands of W bits. Like the vertical-and-crosswise (Urdhva
// Tiryagbhyam) product equations, every result bit is formed from one
// column: column k adds bit k of every operand plus the carry c(k-1) left
// over from column k-1. Bit 0 of that column sum is result bit y[k]; the
// rest of the sum, which may be several bits wide, is the carry c(k) into
// column k+1. The result is taken modulo 2^W.
//
// In the multiplier the operands are the partial-product rows already
// shifted into place, so the sum always fits in W = 2N bits.
//
// Interface: purely combinational, no clock or reset.
//
// The multiplier only fixes that one adder sums the aligned rows into the
// product bits; the column-with-carry organisation, taken from the form of
// the Vedic product equations, is this design's choice.
module vedic_column_adder #(
  parameter int unsigned ROWS = 4,   // operands, N/2 for an N x N multiplier
  parameter int unsigned W    = 16   // operand and result width, 2N
) (
  input  logic [ROWS-1:0][W-1:0] ops,
  output logic [W-1:0]           y
);

  // A column sum is at most ROWS + carry, and the carry stays below ROWS,
  // so CW bits hold every column sum.
  localparam int unsigned CW = $clog2(2 * ROWS + 1) + 1;

  logic [CW-1:0] col_sum [W];
  logic [CW-1:0] col_carry [W+1];

  always_comb begin
    col_carry[0] = '0;
    for (int k = 0; k < W; k++) begin
      col_sum[k] = col_carry[k];
      for (int r = 0; r < ROWS; r++) begin
        col_sum[k] = col_sum[k] + CW'(ops[r][k]);
      end
      y[k]             = col_sum[k][0];
      col_carry[k + 1] = col_sum[k] >> 1;
    end
  end

endmodule
