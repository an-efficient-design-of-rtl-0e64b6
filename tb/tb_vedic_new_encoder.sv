// tb_vedic_new_encoder: exhaustive self-check of the row-encoder bank.
//
// Applies all 2^16 multiplicand/multiplier pairs (N = 8) and checks, for
// every digit i, that codes[i] equals multiplier bits [2i+1:2i] and that
// rows[i] equals that digit times the multiplicand. The reference digits are
// extracted here by division, independently of the RTL's bit slicing. One
// pair per clock cycle, with a watchdog.
module tb_vedic_new_encoder;
  import vedic_enc_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned D = N / 2;
  localparam int unsigned TOTAL = 1 << (2 * N);

  logic                      clk = 1'b0;
  logic  [N-1:0]             multiplicand;
  logic  [N-1:0]             multiplier;
  code_t [D-1:0]             codes;
  logic  [D-1:0][N+1:0]      rows;

  int checks   = 0;
  int failures = 0;

  vedic_new_encoder #(.N(N)) dut (
    .multiplicand (multiplicand),
    .multiplier   (multiplier),
    .codes        (codes),
    .rows         (rows)
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
    int digit;
    for (int m = 0; m < (1 << N); m++) begin
      for (int q = 0; q < (1 << N); q++) begin
        @(posedge clk);
        multiplicand = N'(m);
        multiplier   = N'(q);
        #1;
        for (int i = 0; i < D; i++) begin
          digit = (q / (4 ** i)) % 4;
          checks++;
          if (int'(codes[i]) != digit || int'(rows[i]) != digit * m) begin
            failures++;
            if (failures < 10)
              $display("digit %0d: m=%0d q=%0d code=%0d row=%0d expected code=%0d row=%0d",
                       i, m, q, codes[i], rows[i], digit, digit * m);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
