// tb_vedic_enc_mult: end-to-end exhaustive check of the 8 x 8 multiplier.
//
// The multiplier is used with its default parameters. All 2^16 operand pairs
// are applied, one per clock cycle, and the product is compared with the
// product computed here. The test also counts how often each mechanism of the
// design is used and fails if one never is:
//   - each digit code 0, 1, 2, 3 in each of the four digit positions
//     (a zero row, a plain row, a shifted row, a row from the 3x adder);
//   - products that reach the top bit Y15 (the last shifted row counts);
//   - additions where the column carries ripple through the top columns.
// A watchdog ends the run if it overruns.
module tb_vedic_enc_mult;
  import vedic_enc_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned D = N / 2;
  localparam int unsigned TOTAL = 1 << (2 * N);

  logic            clk = 1'b0;
  logic [N-1:0]    multiplicand;
  logic [N-1:0]    multiplier;
  logic [2*N-1:0]  product;
  code_t [D-1:0]   codes;

  int checks   = 0;
  int failures = 0;
  int seen_code [D][4];
  int top_bit_set = 0;
  int max_product = 0;

  vedic_enc_mult dut (
    .multiplicand (multiplicand),
    .multiplier   (multiplier),
    .product      (product),
    .codes        (codes)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (TOTAL + 100) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    for (int i = 0; i < D; i++)
      for (int c = 0; c < 4; c++) seen_code[i][c] = 0;
    for (int m = 0; m < (1 << N); m++) begin
      for (int q = 0; q < (1 << N); q++) begin
        @(posedge clk);
        multiplicand = N'(m);
        multiplier   = N'(q);
        #1;
        expected = m * q;
        checks++;
        if (int'(product) != expected) begin
          failures++;
          if (failures < 10)
            $display("product mismatch: %0d * %0d = %0d, got %0d", m, q, expected, product);
        end
        for (int i = 0; i < D; i++) seen_code[i][(q >> (2 * i)) & 3]++;
        if (product[2*N-1]) top_bit_set++;
        if (expected == (2 ** N - 1) ** 2) max_product++;
      end
    end
    for (int i = 0; i < D; i++) begin
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (seen_code[i][c] == 0) begin
          failures++;
          $display("digit %0d never used code %0d", i, c);
        end
      end
    end
    checks++;
    if (top_bit_set == 0 || max_product == 0) begin
      failures++;
      $display("top product bit or largest product never reached");
    end
    $display("code use per digit (codes 0/1/2/3): %0d/%0d/%0d/%0d each",
             seen_code[0][0], seen_code[0][1], seen_code[0][2], seen_code[0][3]);
    $display("products with Y%0d set: %0d, largest product reached: %0d", 2 * N - 1,
             top_bit_set, max_product);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
