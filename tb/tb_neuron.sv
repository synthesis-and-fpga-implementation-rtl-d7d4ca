// tb_neuron: checks the bit-serial neuron y = H(b + sum w*x).
// Two instances: a 3-input neuron with mixed-sign weights including the
// extremes of the number range, and a 1-input hidden-style neuron
// (weight +1.0, bias -2.5). Random inputs are written to the input RAMs,
// the reference sum is computed in integers (units 1/1024) and compared with
// net and y, and the cycles from start to done are checked against
// (N_IN+1)*ACC_W + 2. Also checks that start is ignored while busy, that
// input writes while busy are dropped, and that both y = 0 and y = 1 occur.
module tb_neuron;
  import nadc_pkg::*;

  localparam int unsigned N3 = 3;
  localparam int unsigned ACC3 = 18 + 2;
  localparam sm_t [N3:0] W3 = {9'b0_1111_1111, 9'b1_1111_1111, 9'b0_0111_0001, 9'b1_0000_1000};
  localparam sm_t [1:0]  W1 = {9'b1_0010_0000, 9'b0_0101_0000};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic we3 = 0, start3 = 0, busy3, done3, y3;
  logic [1:0] waddr3 = '0;
  sm_t wdata3 = SM_ZERO;
  logic signed [ACC3-1:0] net3;

  logic we1 = 0, start1 = 0, busy1, done1, y1;
  sm_t wdata1 = SM_ZERO;
  logic signed [18:0] net1;

  neuron #(.N_IN(N3), .WEIGHTS(W3)) dut3 (
    .clk, .rst_n, .in_we(we3), .in_waddr(waddr3), .in_wdata(wdata3),
    .start(start3), .busy(busy3), .done(done3), .y(y3), .net(net3));

  neuron #(.N_IN(1), .WEIGHTS(W1)) dut1 (
    .clk, .rst_n, .in_we(we1), .in_waddr(1'b0), .in_wdata(wdata1),
    .start(start1), .busy(busy1), .done(done1), .y(y1), .net(net1));

  int checks = 0, failures = 0;
  int n_fire = 0, n_quiet = 0;

  function automatic int val(sm_t v);
    return v.pos ? int'(v.mag) : -int'(v.mag);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run3(input sm_t x0, input sm_t x1, input sm_t x2);
    int expect_v, lat;
    sm_t xs [3];
    xs = '{x0, x1, x2};
    for (int i = 0; i < 3; i++) begin
      we3 <= 1; waddr3 <= 2'(i); wdata3 <= xs[i];
      @(posedge clk);
    end
    we3 <= 0;
    expect_v = val(W3[0]) * 32;
    for (int i = 0; i < 3; i++) expect_v += val(W3[i+1]) * val(xs[i]);
    start3 <= 1;
    @(posedge clk);
    start3 <= 0;
    lat = 0;
    // A write and a second start while busy must both be ignored.
    we3 <= 1; waddr3 <= 2'd0; wdata3 <= 9'b1_1111_1111; start3 <= 1;
    @(posedge clk);
    we3 <= 0; start3 <= 0;
    lat = 1;
    while (!done3) begin @(posedge clk); lat++; #1; end
    check(lat == (N3 + 1) * ACC3 + 2, $sformatf("latency %0d", lat));
    check(int'(net3) == expect_v, $sformatf("net %0d expected %0d", net3, expect_v));
    check(y3 == (expect_v >= 0), "y of 3-input neuron");
    if (expect_v >= 0) n_fire++; else n_quiet++;
    @(posedge clk);
    check(!busy3, "busy after done");
  endtask

  task automatic run1(input sm_t x);
    int expect_v, lat;
    we1 <= 1; wdata1 <= x;
    @(posedge clk);
    we1 <= 0; start1 <= 1;
    @(posedge clk);
    start1 <= 0;
    lat = 0;
    while (!done1) begin @(posedge clk); lat++; #1; end
    expect_v = val(W1[0]) * 32 + val(W1[1]) * val(x);
    check(lat == 2 * 19 + 2 - 1 + 1, $sformatf("latency1 %0d", lat));
    check(int'(net1) == expect_v, $sformatf("net1 %0d expected %0d", net1, expect_v));
    check(y1 == (val(x) >= 80), $sformatf("y1 for x=%0d", val(x)));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run3(9'b1_1111_1111, 9'b0_1111_1111, 9'b1_1111_1111);
    run3(9'b0_0000_0000, 9'b1_0000_0000, 9'b0_0000_0001);
    for (int t = 0; t < 60; t++) run3(sm_t'($urandom), sm_t'($urandom), sm_t'($urandom));
    // Threshold of the 1-input neuron is 2.5 (80 steps): probe around it.
    for (int v = 70; v <= 90; v++) run1(to_sm(v));
    for (int t = 0; t < 30; t++) run1(sm_t'($urandom));
    check(n_fire > 0 && n_quiet > 0, "both activation outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
