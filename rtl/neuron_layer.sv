// neuron_layer: a layer of NEURONS identical-shape neurons on one input bus.
//
// Every neuron has N_IN inputs and its own bias and weights (WEIGHTS[k] is
// neuron k's ROM image, word 0 the bias). The input-RAM write port and start
// are broadcast, so one write per input fills all the neurons' RAMs and all
// neurons compute in parallel; their outputs y[k] appear together with done.
// The number of neurons is a parameter, so layers of any size come from the
// same description. In the ADC this is the hidden layer: 63 neurons with one
// input each (the bridge voltage), acting as comparators.
//   in_we/in_waddr/in_wdata : broadcast input write (while idle)
//   start : begin a computation     busy : any neuron busy
//   done  : one-cycle pulse, neuron_latency(N_IN) cycles after start
//   y     : outputs of all neurons, valid from done until the next start
// The layer as an array of neurons follows the document; the broadcast input
// bus is this design's choice.
module neuron_layer
  import nadc_pkg::*;
#(
  parameter int unsigned NEURONS = N_HIDDEN,
  parameter int unsigned N_IN    = 1,
  parameter sm_t [NEURONS-1:0][N_IN:0] WEIGHTS = '0,
  localparam int unsigned AW = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_we,
  input  logic [AW-1:0]      in_waddr,
  input  sm_t                in_wdata,
  input  logic               start,
  output logic               busy,
  output logic               done,
  output logic [NEURONS-1:0] y
);

  localparam int unsigned ACC_W = acc_width(N_IN);

  logic [NEURONS-1:0] busy_v, done_v;

  for (genvar k = 0; k < NEURONS; k++) begin : g_neuron
    logic signed [ACC_W-1:0] net_unused;
    neuron #(.N_IN(N_IN), .ACC_W(ACC_W), .WEIGHTS(WEIGHTS[k])) u_neuron (
      .clk     (clk),
      .rst_n   (rst_n),
      .in_we   (in_we),
      .in_waddr(in_waddr),
      .in_wdata(in_wdata),
      .start   (start),
      .busy    (busy_v[k]),
      .done    (done_v[k]),
      .y       (y[k]),
      .net     (net_unused)
    );
  end

  assign busy = |busy_v;
  assign done = &done_v;

endmodule
