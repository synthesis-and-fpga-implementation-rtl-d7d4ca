// tb_sp_multiplier: checks the two's complement serial-parallel multiplier.
// A 4-bit instance is run over all 4x4-bit signed operand pairs (8 product
// bits); the default 9-bit instance gets random 9x9-bit signed pairs run for
// 24 cycles, as inside the neuron. Products are streamed back to back (clr
// on each LSB) and compared bit by bit with the integer product.
module tb_sp_multiplier;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic       en4 = 0, clr4 = 0, x4 = 0, p4;
  logic [3:0] a4 = '0;
  logic       en9 = 0, clr9 = 0, x9 = 0, p9;
  logic [8:0] a9 = '0;

  sp_multiplier #(.A_W(4)) dut4 (.clk, .rst_n, .en(en4), .clr(clr4), .a(a4), .x(x4), .p(p4));
  sp_multiplier            dut9 (.clk, .rst_n, .en(en9), .clr(clr9), .a(a9), .x(x9), .p(p9));

  // Runs one product on the 4-bit unit: x sign-extended over T cycles.
  task automatic mul4(input logic signed [3:0] a, input logic signed [3:0] x);
    logic signed [7:0] expect_v, got;
    expect_v = 8'(int'(a) * int'(x));
    got = '0;
    a4 <= a;
    for (int k = 0; k < 8; k++) begin
      en4 <= 1; clr4 <= (k == 0); x4 <= x[(k < 4) ? k : 3];
      @(posedge clk); #1;
      got[k] = p4;
    end
    checks++;
    if (got !== expect_v) begin
      failures++;
      $display("FAIL 4-bit %0d * %0d = %0d got %0d", a, x, expect_v, got);
    end
  endtask

  task automatic mul9(input logic signed [8:0] a, input logic signed [8:0] x);
    logic signed [23:0] expect_v, got;
    expect_v = 24'(int'(a) * int'(x));
    got = '0;
    a9 <= a;
    for (int k = 0; k < 24; k++) begin
      en9 <= 1; clr9 <= (k == 0); x9 <= x[(k < 9) ? k : 8];
      @(posedge clk); #1;
      got[k] = p9;
    end
    checks++;
    if (got !== expect_v) begin
      failures++;
      $display("FAIL 9-bit %0d * %0d = %0d got %0d", a, x, expect_v, got);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int a = -8; a < 8; a++)
      for (int x = -8; x < 8; x++)
        mul4(4'(a), 4'(x));
    en4 <= 0;
    mul9(-9'sd255, -9'sd255);
    mul9(-9'sd255, 9'sd255);
    mul9(9'sd255, 9'sd255);
    mul9(-9'sd256, 9'sd1);
    mul9(9'sd32, -9'sd113);
    for (int t = 0; t < 400; t++) mul9(9'($urandom), 9'($urandom));
    en9 <= 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
