// tb_vedic_row_encoder: exhaustive self-check of one partial-product row.
//
// Applies every multiplicand (N = 8, the default) with every 2-bit group and
// compares the code with the group's value and the row with group x
// multiplicand, computed here by ordinary multiplication. One combination is
// applied per clock cycle; a watchdog ends the run if it overruns.
module tb_vedic_row_encoder;
  import vedic_enc_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned TOTAL = (1 << N) * 4;

  logic         clk = 1'b0;
  logic [N-1:0] multiplicand;
  logic [1:0]   bits;
  code_t        code;
  logic [N+1:0] row;

  int checks   = 0;
  int failures = 0;
  int seen_code [4];

  vedic_row_encoder #(.N(N)) dut (
    .multiplicand (multiplicand),
    .bits         (bits),
    .code         (code),
    .row          (row)
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
    logic [N+1:0] expected;
    for (int c = 0; c < 4; c++) seen_code[c] = 0;
    for (int m = 0; m < (1 << N); m++) begin
      for (int b = 0; b < 4; b++) begin
        @(posedge clk);
        multiplicand = N'(m);
        bits         = 2'(b);
        #1;
        expected = (N + 2)'(m * b);
        checks++;
        if (code != code_t'(b)) begin
          failures++;
          if (failures < 10) $display("code mismatch: bits=%0d code=%0d", b, code);
        end
        checks++;
        if (row !== expected) begin
          failures++;
          if (failures < 10)
            $display("row mismatch: m=%0d bits=%0d row=%0d expected=%0d", m, b, row, expected);
        end
        seen_code[code]++;
      end
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (seen_code[c] == 0) begin
        failures++;
        $display("code %0d never exercised", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
