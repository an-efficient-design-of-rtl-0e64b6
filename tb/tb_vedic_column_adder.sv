// tb_vedic_column_adder: self-check of the column-wise multi-operand adder.
//
// Drives 4 operands of 16 bits (the sizes used by the 8 x 8 multiplier):
// first corner cases (all zero, all ones, a single bit, long carry chains),
// then random operands. The reference is the plain sum modulo 2^16. One
// vector per clock cycle, with a watchdog.
module tb_vedic_column_adder;

  localparam int unsigned ROWS   = 4;
  localparam int unsigned W      = 16;
  localparam int unsigned RANDOM = 20000;

  logic                  clk = 1'b0;
  logic [ROWS-1:0][W-1:0] ops;
  logic [W-1:0]           y;

  int checks   = 0;
  int failures = 0;

  vedic_column_adder #(.ROWS(ROWS), .W(W)) dut (
    .ops (ops),
    .y   (y)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (RANDOM + 200) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [ROWS-1:0][W-1:0] v);
    longint unsigned sum;
    @(posedge clk);
    ops = v;
    #1;
    sum = 0;
    for (int r = 0; r < ROWS; r++) sum += longint'(v[r]);
    checks++;
    if (y !== W'(sum)) begin
      failures++;
      if (failures < 10) $display("sum mismatch: ops=%h y=%h expected=%h", v, y, W'(sum));
    end
  endtask

  initial begin
    logic [ROWS-1:0][W-1:0] v;
    apply('0);
    apply('1);
    for (int r = 0; r < ROWS; r++) begin
      for (int k = 0; k < W; k++) begin
        v = '0;
        v[r][k] = 1'b1;
        apply(v);
      end
    end
    // Carry chains: 0xFFFF plus a 1 in each row position.
    for (int r = 1; r < ROWS; r++) begin
      v = '0;
      v[0] = '1;
      v[r] = W'(1);
      apply(v);
    end
    for (int n = 0; n < RANDOM; n++) begin
      for (int r = 0; r < ROWS; r++) v[r] = W'($urandom);
      apply(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
