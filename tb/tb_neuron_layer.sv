// tb_neuron_layer: a layer of 5 neurons with 2 inputs each and different
// weights. Random input pairs are broadcast through the shared write port;
// all five outputs are compared with the integer evaluation of each neuron,
// and done must come neuron_latency(2) = 3*20+2 cycles after start.
module tb_neuron_layer;
  import nadc_pkg::*;

  localparam int unsigned NN = 5;
  localparam sm_t [NN-1:0][2:0] W = '{
    '{9'b1_0100_0000, 9'b0_0010_0000, 9'b0_0000_1000},
    '{9'b0_1000_0000, 9'b1_0001_1000, 9'b1_0001_0000},
    '{9'b1_1111_1111, 9'b1_1111_1111, 9'b0_1111_1111},
    '{9'b0_0000_0001, 9'b1_0000_0011, 9'b1_0000_0000},
    '{9'b1_0010_0000, 9'b1_0010_0000, 9'b0_0100_0000}};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_we = 0, start = 0, busy, done;
  logic [0:0] in_waddr = '0;
  sm_t in_wdata = SM_ZERO;
  logic [NN-1:0] y;
  int checks = 0, failures = 0;
  int ones = 0, zeros = 0;

  neuron_layer #(.NEURONS(NN), .N_IN(2), .WEIGHTS(W)) dut (.*);

  function automatic int val(sm_t v);
    return v.pos ? int'(v.mag) : -int'(v.mag);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 80; t++) begin
      sm_t x0, x1;
      int lat;
      x0 = sm_t'($urandom); x1 = sm_t'($urandom);
      in_we <= 1; in_waddr <= 1'b0; in_wdata <= x0; @(posedge clk);
      in_we <= 1; in_waddr <= 1'b1; in_wdata <= x1; @(posedge clk);
      in_we <= 0; start <= 1; @(posedge clk);
      start <= 0;
      lat = 0;
      #1;
      while (!done) begin @(posedge clk); lat++; #1; end
      checks++;
      if (lat != neuron_latency(2)) begin failures++; $display("FAIL latency %0d", lat); end
      for (int k = 0; k < NN; k++) begin
        int s;
        bit e;
        s = val(W[k][0]) * 32 + val(W[k][1]) * val(x0) + val(W[k][2]) * val(x1);
        e = (s >= 0);
        if (e) ones++; else zeros++;
        checks++;
        if (y[k] !== e) begin
          failures++;
          $display("FAIL neuron %0d x=%0d,%0d sum %0d y %b", k, val(x0), val(x1), s, y[k]);
        end
      end
    end
    checks++;
    if (ones == 0 || zeros == 0) begin failures++; $display("FAIL one outcome never seen"); end
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
