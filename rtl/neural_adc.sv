// neural_adc: nonlinear analog-to-digital conversion by a neural network.
//
// A sensor whose voltage is a nonlinear function of the measured quantity
// (an NTC thermistor bridge) is linearized and quantized in one step by a
// 1-63-6 network of threshold neurons: the 63 hidden neurons compare the
// input with 63 thresholds placed on the sensor's characteristic, and each of
// the six output neurons turns a nested subset of them into one bit of the
// output code. The code is thus linear in the physical quantity while the
// input is the raw, nonlinear bridge voltage.
//
// The input sample vin is a 9-bit sign-magnitude number (1 sign bit, 1 =
// plus; magnitude LSB 1/32). A conversion runs in three steps:
//   1. the sample is written into every hidden neuron's input RAM and the
//      hidden layer (63 neurons, 2 terms of 19 bits each) runs,
//   2. the output layer loads the 63 hidden outputs into its neurons' RAMs,
//   3. the six output neurons run; the LSB neuron, 64 terms of 24 bits, is
//      the longest.
// Conversions do not overlap: ready is high while the converter is idle.
//   vin, vin_valid : sample and strobe, accepted when ready
//   ready          : idle, a new sample is accepted
//   code, code_valid : result, code_valid is a one-cycle pulse; code holds
//                      until the next result
//   hidden         : thermometer code of the hidden layer (for test and
//                    calibration; valid with code_valid)
// Latency from the cycle vin_valid is accepted to code_valid:
//   CONV_CYCLES = 1 + neuron_latency(1) + 2 + (63 + 2 + neuron_latency(63)) + 1
//               = 1 + 40 + 2 + 1603 + 1 = 1647 clock cycles.
// The network shape, the neuron arithmetic and the reconfiguration by
// weights alone follow the document. The weights and thresholds (see
// nadc_pkg) and the non-overlapped sequencing are this design's choices;
// new weights are passed through HIDDEN_W and OUTPUT_W.
module neural_adc
  import nadc_pkg::*;
#(
  parameter hidden_layer_w_t HIDDEN_W = default_hidden_weights(),
  parameter out_layer_w_t    OUTPUT_W = default_output_weights()
) (
  input  logic                clk,
  input  logic                rst_n,
  input  sm_t                 vin,
  input  logic                vin_valid,
  output logic                ready,
  output logic [ADC_BITS-1:0] code,
  output logic                code_valid,
  output logic [N_HIDDEN-1:0] hidden
);

  typedef enum logic [2:0] {A_IDLE, A_HSTART, A_HWAIT, A_OSTART, A_OWAIT} astate_t;

  astate_t state;
  logic    h_we, h_start, h_busy, h_done;
  logic    o_start, o_busy, o_done;
  logic [ADC_BITS-1:0] o_code;

  always_ff @(posedge clk) begin
    if (!rst_n) state <= A_IDLE;
    else begin
      unique case (state)
        A_IDLE:   if (vin_valid) state <= A_HSTART;
        A_HSTART: state <= A_HWAIT;
        A_HWAIT:  if (h_done) state <= A_OSTART;
        A_OSTART: state <= A_OWAIT;
        A_OWAIT:  if (o_done) state <= A_IDLE;
        default:  state <= A_IDLE;
      endcase
    end
  end

  assign ready   = (state == A_IDLE);
  assign h_we    = (state == A_IDLE) && vin_valid;
  assign h_start = (state == A_HSTART);
  assign o_start = (state == A_OSTART);

  neuron_layer #(.NEURONS(N_HIDDEN), .N_IN(1), .WEIGHTS(HIDDEN_W)) u_hidden (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_we   (h_we),
    .in_waddr(1'b0),
    .in_wdata(vin),
    .start   (h_start),
    .busy    (h_busy),
    .done    (h_done),
    .y       (hidden)
  );

  adc_output_layer #(.WEIGHTS(OUTPUT_W)) u_output (
    .clk  (clk),
    .rst_n(rst_n),
    .h    (hidden),
    .start(o_start),
    .busy (o_busy),
    .done (o_done),
    .code (o_code)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      code       <= '0;
      code_valid <= 1'b0;
    end else begin
      code_valid <= o_done;
      if (o_done) code <= o_code;
    end
  end

  // A new sample is never accepted while a layer is still working.
  a_idle_layers: assert property (@(posedge clk) disable iff (!rst_n)
                                  state == A_IDLE |-> !h_busy && !o_busy);

endmodule
