// tb_neural_adc: end-to-end test of the neural nonlinear ADC at its default
// size (63 hidden neurons, 6 output bits, default weights).
// Every one of the 511 distinct input values -7.96875 .. +7.96875 is
// converted, in random order, and the code is compared with the ideal
// nonlinear quantizer worked out here: code = number of thresholds
// t(k) = floor(k*(384-2k)/64), k = 1..63, that the input reaches. The
// thermometer code of the hidden layer is checked too, as is the conversion
// time of 1647 cycles. Mechanisms counted (each must occur): every output
// code 0..63 (no missing codes), clipping below the first threshold
// (negative inputs included) and above the last one, a sample offered while
// a conversion runs (must be ignored), and back-to-back conversions.
module tb_neural_adc;
  import nadc_pkg::*;

  localparam int CONV_CYCLES = 1647;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sm_t vin = SM_ZERO;
  logic vin_valid = 0, ready, code_valid;
  logic [5:0] code;
  logic [62:0] hidden;

  neural_adc dut (.*);

  int checks = 0, failures = 0;
  int code_seen [64];
  int n_clip_lo = 0, n_clip_hi = 0, n_neg = 0, n_ignored = 0, n_b2b = 0;

  function automatic int ideal_code(int v);
    int m = 0;
    for (int k = 1; k <= 63; k++) if (v >= (k * (384 - 2 * k)) / 64) m++;
    return m;
  endfunction

  task automatic convert(input int v, input bit poke_busy);
    int lat, m;
    logic [62:0] therm;
    vin <= to_sm(v); vin_valid <= 1;
    @(posedge clk);
    vin_valid <= 0;
    lat = 0;
    #1;
    while (!code_valid) begin
      if (poke_busy && lat == 100) begin
        checks++;
        if (ready) begin failures++; $display("FAIL ready while converting"); end
        vin <= to_sm(-v); vin_valid <= 1;      // must be ignored
        n_ignored++;
      end else vin_valid <= 0;
      @(posedge clk); lat++; #1;
      if (lat > 3 * CONV_CYCLES) break;
    end
    m = ideal_code(v);
    therm = 63'((64'd1 << m) - 1);
    checks++;
    if (lat != CONV_CYCLES) begin failures++; $display("FAIL latency %0d", lat); end
    checks++;
    if (int'(code) != m) begin failures++; $display("FAIL vin=%0d code %0d expected %0d", v, code, m); end
    checks++;
    if (hidden !== therm) begin failures++; $display("FAIL vin=%0d hidden %h", v, hidden); end
    code_seen[code]++;
    if (m == 0)  n_clip_lo++;
    if (m == 63 && v > 253) n_clip_hi++;
    if (v < 0)   n_neg++;
    checks++;
    if (!ready) begin failures++; $display("FAIL not ready after conversion"); end
  endtask

  initial begin
    int order [511];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 511; i++) order[i] = i - 255;
    order.shuffle();
    foreach (order[i]) begin
      convert(order[i], (i % 50) == 7);
      if (i % 2 == 0) @(posedge clk); else n_b2b++;   // gap or back to back
    end
    for (int c = 0; c < 64; c++) begin
      checks++;
      if (code_seen[c] == 0) begin failures++; $display("FAIL code %0d never produced", c); end
    end
    $display("mechanisms: clip_lo=%0d clip_hi=%0d negative=%0d ignored=%0d back_to_back=%0d",
             n_clip_lo, n_clip_hi, n_neg, n_ignored, n_b2b);
    checks++; if (n_clip_lo == 0) begin failures++; $display("FAIL no low clipping"); end
    checks++; if (n_clip_hi == 0) begin failures++; $display("FAIL no high clipping"); end
    checks++; if (n_neg == 0)     begin failures++; $display("FAIL no negative input"); end
    checks++; if (n_ignored == 0) begin failures++; $display("FAIL no busy sample"); end
    checks++; if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
