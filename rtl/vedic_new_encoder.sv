// vedic_new_encoder: all partial-product rows of the encoded Vedic multiplier.
//
// The N-bit multiplier is grouped into N/2 two-bit digits starting at the LSB:
// digit i is {multiplier[2i+1], multiplier[2i]}. Each digit drives its own
// vedic_row_encoder together with the shared multiplicand, so the N/2 rows
// (the "1st" to "4th" outputs of the encoder for N = 8) come out in parallel.
// Row i is not yet shifted: it still has to be weighted by 2^(2i) before the
// final addition.
//
// Interface: purely combinational. codes[i] is A_i and rows[i] is
// A_i x multiplicand, N+2 bits wide.
//
// The digit grouping and the per-digit row generation follow the method. The
// method also describes feeding the digits through one encoder one after the
// other; this design instead gives every digit its own encoder, which matches
// the block diagram where all encoder outputs reach the adder at once.
module vedic_new_encoder
  import vedic_enc_pkg::*;
#(
  parameter int unsigned N = 8  // operand width, even
) (
  input  logic  [N-1:0]                multiplicand,
  input  logic  [N-1:0]                multiplier,
  output code_t [N/2-1:0]              codes,
  output logic  [N/2-1:0][N+1:0]       rows
);

  localparam int unsigned GROUP_BITS = 2;  // multiplier bits per digit

  if (N < 2 || (N % 2) != 0) begin : g_bad_width
    $error("vedic_new_encoder: N must be even and at least 2");
  end

  for (genvar i = 0; i < N / 2; i++) begin : g_digit
    vedic_row_encoder #(.N(N)) u_row (
      .multiplicand (multiplicand),
      .bits         (multiplier[GROUP_BITS*i +: GROUP_BITS]),
      .code         (codes[i]),
      .row          (rows[i])
    );
  end

endmodule
