// tb_adc_output_layer: drives the six output neurons with hidden patterns.
// Every thermometer code with m = 0..63 hidden neurons on must give code m.
// Random non-thermometer patterns are checked against the weighted sums
// worked out here: bit b = [sum_j (-1)^j h[(j+1)*2^b-1] - 0.5 >= 0].
// The load-plus-compute time must be 63 + 2 + neuron_latency(63) cycles.
module tb_adc_output_layer;
  import nadc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [62:0] h = '0;
  logic start = 0, busy, done;
  logic [5:0] code;
  int checks = 0, failures = 0;

  adc_output_layer dut (.*);

  function automatic logic [5:0] ref_code(logic [62:0] hv);
    logic [5:0] r;
    for (int b = 0; b < 6; b++) begin
      int s;
      s = -1;                                    // -0.5, doubled
      for (int j = 0; j < (1 << (6 - b)) - 1; j++)
        if (hv[(j + 1) * (1 << b) - 1]) s += (j % 2 == 0) ? 2 : -2;
      r[b] = (s >= 0);
    end
    return r;
  endfunction

  task automatic convert(input logic [62:0] hv, input logic [5:0] expect_v);
    int lat;
    h <= hv; start <= 1;
    @(posedge clk);
    start <= 0; h <= ~hv;             // h is captured on start
    lat = 0;
    #1;
    while (!done) begin @(posedge clk); lat++; #1; end
    checks++;
    if (lat != 63 + 2 + int'(neuron_latency(63))) begin
      failures++; $display("FAIL latency %0d", lat);
    end
    checks++;
    if (code !== expect_v) begin
      failures++; $display("FAIL h=%h code %0d expected %0d", hv, code, expect_v);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int m = 0; m <= 63; m++) convert(63'((64'd1 << m) - 1), 6'(m));
    for (int t = 0; t < 20; t++) begin
      logic [62:0] hv;
      hv = {$urandom, $urandom};
      convert(hv, ref_code(hv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
