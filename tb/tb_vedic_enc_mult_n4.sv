// tb_vedic_enc_mult_n4: exhaustive check of the multiplier built for 4-bit
// operands (two partial-product rows, one shift of 2 bits, 8-bit product).
//
// All 256 operand pairs are applied, one per clock cycle, and each product is
// compared with the product computed here. Each digit code must be seen in
// both digit positions. A watchdog ends the run if it overruns.
module tb_vedic_enc_mult_n4;
  import vedic_enc_pkg::*;

  localparam int unsigned N = 4;
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

  vedic_enc_mult #(.N(N)) dut (
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
    for (int i = 0; i < D; i++)
      for (int c = 0; c < 4; c++) seen_code[i][c] = 0;
    for (int m = 0; m < (1 << N); m++) begin
      for (int q = 0; q < (1 << N); q++) begin
        @(posedge clk);
        multiplicand = N'(m);
        multiplier   = N'(q);
        #1;
        checks++;
        if (int'(product) != m * q) begin
          failures++;
          if (failures < 10)
            $display("product mismatch: %0d * %0d = %0d, got %0d", m, q, m * q, product);
        end
        for (int i = 0; i < D; i++) seen_code[i][codes[i]]++;
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
