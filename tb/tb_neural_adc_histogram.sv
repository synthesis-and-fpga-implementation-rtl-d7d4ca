// tb_neural_adc_histogram: code-density (histogram) and spectral test of the
// neural nonlinear ADC at its default size.
// A 5 kHz sine spanning the input range is sampled N = 5000 times at
// fs = 5000*5 kHz/833 (833 whole periods, coherent sampling) with a 50 MHz
// clock, i.e. one sample every 1666 cycles; each conversion must finish
// within that interval. The test builds the histogram of output codes and
// compares it with the ideal nonlinear quantizer evaluated here on the same
// samples (every code must occur: no missing codes), then takes the DFT
// D[n] = sum d[i] exp(-j 2 pi i n / N) of both output sequences and checks
// that their power spectra agree bin by bin.
module tb_neural_adc_histogram;
  import nadc_pkg::*;

  localparam int    N       = 5000;
  localparam int    PERIODS = 833;
  localparam int    SAMPLE_CYCLES = 1666;   // 50 MHz / 30.01 kS/s
  localparam real   PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;                   // 50 MHz

  sm_t vin = SM_ZERO;
  logic vin_valid = 0, ready, code_valid;
  logic [5:0] code;
  logic [62:0] hidden;

  neural_adc dut (.*);

  int checks = 0, failures = 0;
  int hist [64], hist_ideal [64];
  int d_nn [N], d_id [N];

  function automatic int ideal_code(int v);
    int m = 0;
    for (int k = 1; k <= 63; k++) if (v >= (k * (384 - 2 * k)) / 64) m++;
    return m;
  endfunction

  initial begin
    int n_missing = 0, n_mismatch = 0, n_late = 0;
    real max_err_db = 0.0;
    real re_a, im_a, re_b, im_b, pa, pb, e, ph;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      int v, wait_c;
      v = int'($floor(128.0 + 126.0 * $sin(2.0 * PI * PERIODS * i / N) + 0.5));
      if (!ready) n_late++;
      vin <= to_sm(v); vin_valid <= 1;
      @(posedge clk);
      vin_valid <= 0;
      wait_c = 1;
      #1;
      while (!code_valid && wait_c < SAMPLE_CYCLES) begin @(posedge clk); wait_c++; #1; end
      d_nn[i] = code;
      d_id[i] = ideal_code(v);
      hist[code]++;
      hist_ideal[d_id[i]]++;
      if (!code_valid) n_late++;
      if (d_nn[i] != d_id[i]) n_mismatch++;
      repeat (SAMPLE_CYCLES - wait_c) @(posedge clk);
    end
    checks++; if (n_late != 0)     begin failures++; $display("FAIL %0d samples not converted in time", n_late); end
    checks++; if (n_mismatch != 0) begin failures++; $display("FAIL %0d codes differ from the ideal ADC", n_mismatch); end
    for (int c = 0; c < 64; c++) begin
      checks++;
      if (hist[c] == 0) begin n_missing++; failures++; $display("FAIL missing code %0d", c); end
      checks++;
      if (hist[c] != hist_ideal[c]) begin
        failures++; $display("FAIL code %0d occurs %0d times, ideal %0d", c, hist[c], hist_ideal[c]);
      end
    end
    // Power spectra of both outputs (direct DFT over the bins 0..N/2).
    for (int n = 0; n <= N / 2; n++) begin
      re_a = 0.0; im_a = 0.0; re_b = 0.0; im_b = 0.0;
      for (int i = 0; i < N; i++) begin
        ph = 2.0 * PI * real'((i * n) % N) / real'(N);
        re_a += d_nn[i] * $cos(ph); im_a -= d_nn[i] * $sin(ph);
        re_b += d_id[i] * $cos(ph); im_b -= d_id[i] * $sin(ph);
      end
      pa = re_a * re_a + im_a * im_a;
      pb = re_b * re_b + im_b * im_b;
      e = 10.0 * $log10((pa + 1.0e-9) / (pb + 1.0e-9));
      if (e < 0) e = -e;
      if (e > max_err_db) max_err_db = e;
      if (n == PERIODS) begin
        checks++;
        if (pa < pb * 0.5 || pa <= 0.0) begin failures++; $display("FAIL fundamental bin power %g", pa); end
      end
    end
    checks++;
    if (max_err_db > 0.01) begin failures++; $display("FAIL spectra differ by %g dB", max_err_db); end
    $display("histogram: %0d samples, %0d missing codes, largest spectral error %g dB",
             N, n_missing, max_err_db);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N * SAMPLE_CYCLES + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
