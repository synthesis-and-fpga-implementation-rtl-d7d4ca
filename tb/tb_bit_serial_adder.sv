// tb_bit_serial_adder: streams random word pairs of several lengths through
// the serial adder back to back (clr on each LSB) and checks every sum bit,
// one cycle after its operand bits, against the integer sum modulo 2^n.
module tb_bit_serial_adder;
  logic clk = 0, rst_n = 0, en = 0, clr = 0, a = 0, b = 0;
  logic s, co;
  int   checks = 0, failures = 0;
  int   cycles = 0;

  bit_serial_adder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    logic [31:0] wa, wb, ws, got;
    int n;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      n  = (t % 4 == 0) ? 4 : (t % 4 == 1) ? 8 : (t % 4 == 2) ? 16 : 32;
      wa = $urandom; wb = $urandom;
      if (t == 0) begin wa = 32'hFFFF_FFFF; wb = 32'h1; end   // full carry chain
      ws = wa + wb;
      got = '0;
      for (int k = 0; k < n; k++) begin
        en  <= 1;
        clr <= (k == 0);
        a   <= wa[k];
        b   <= wb[k];
        @(posedge clk);
        #1;
        got[k] = s;
      end
      // One idle cycle between some words: the stored carry must not leak.
      if (t % 3 == 0) begin
        en <= 0;
        @(posedge clk);
      end
      for (int k = 0; k < n; k++) begin
        checks++;
        if (got[k] !== ws[k]) begin
          failures++;
          $display("FAIL n=%0d a=%h b=%h bit %0d", n, wa, wb, k);
        end
      end
    end
    // Latency: one cycle from operand bits to sum bit.
    en <= 1; clr <= 1; a <= 1; b <= 0;
    @(posedge clk); #1;
    checks++;
    if (s !== 1'b1) begin failures++; $display("FAIL latency"); end
    en <= 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
