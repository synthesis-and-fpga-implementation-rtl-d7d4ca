// adc_output_layer: the six output neurons of the neural ADC.
//
// Output bit b (b = 0 is the LSB) is a neuron with out_fanin(b) = 2^(6-b)-1
// inputs: 63 for the LSB down to 1 for the MSB. Its inputs are the hidden
// neurons out_src(b, j) = (j+1)*2^b - 1, so the hidden sets of the higher bits
// are nested inside those of the lower bits and the LSB uses all 63. This is
// how one shared hidden layer of 63 neurons replaces six separate ones.
//
// On start the layer captures the hidden outputs h, then spends 63 cycles
// writing them, one input index per cycle and as +1.0 or 0.0, into the input
// RAMs of all six neurons at once, and then starts the six neurons. done
// comes when the slowest (the LSB, 64 terms) has finished; code holds the six
// bits from then on.
//   h     : hidden-layer outputs (sampled on start)
//   start : begin (ignored while busy)     busy : loading or computing
//   done  : one-cycle pulse, 63 + 2 + neuron_latency(63) cycles after start
//   code  : output bits, code[b] = bit b
// The bit-to-neuron counts and the nesting follow the document; which hidden
// neurons feed each bit and the load sequence are this design's choices.
module adc_output_layer
  import nadc_pkg::*;
#(
  parameter out_layer_w_t WEIGHTS = default_output_weights()
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_HIDDEN-1:0] h,
  input  logic                start,
  output logic                busy,
  output logic                done,
  output logic [ADC_BITS-1:0] code
);

  localparam int unsigned LW = $clog2(N_HIDDEN + 1);

  typedef enum logic [1:0] {L_IDLE, L_LOAD, L_START, L_WAIT} lstate_t;

  lstate_t             state;
  logic [N_HIDDEN-1:0] h_q;
  logic [LW-1:0]       idx;
  logic [ADC_BITS-1:0] n_busy, n_done, n_y;
  logic                n_start;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= L_IDLE;
      h_q   <= '0;
      idx   <= '0;
      done  <= 1'b0;
      code  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        L_IDLE: if (start) begin
          h_q   <= h;
          idx   <= '0;
          state <= L_LOAD;
        end
        L_LOAD: begin
          idx <= idx + 1'b1;
          if (idx == LW'(N_HIDDEN - 1)) state <= L_START;
        end
        L_START: state <= L_WAIT;
        L_WAIT: if (&n_done) begin
          code  <= n_y;
          done  <= 1'b1;
          state <= L_IDLE;
        end
        default: state <= L_IDLE;
      endcase
    end
  end

  assign busy    = (state != L_IDLE) || (|n_busy);
  assign n_start = (state == L_START);

  for (genvar b = 0; b < ADC_BITS; b++) begin : g_bit
    localparam int unsigned FAN   = out_fanin(b);
    localparam int unsigned AW    = (FAN > 1) ? $clog2(FAN) : 1;
    localparam int unsigned ACC_W = acc_width(FAN);

    logic    we;
    sm_t     wdata;
    logic    done_b, done_q;
    logic signed [ACC_W-1:0] net_unused;

    // Input idx of this bit is hidden neuron out_src(b, idx).
    always_comb begin
      we    = (state == L_LOAD) && (int'(idx) < FAN);
      wdata = SM_ZERO;
      for (int unsigned j = 0; j < FAN; j++)
        if (int'(idx) == j) wdata = h_q[out_src(b, j)] ? SM_ONE : SM_ZERO;
    end

    neuron #(.N_IN(FAN), .ACC_W(ACC_W), .WEIGHTS(WEIGHTS[b][FAN:0])) u_neuron (
      .clk     (clk),
      .rst_n   (rst_n),
      .in_we   (we),
      .in_waddr(AW'(idx)),
      .in_wdata(wdata),
      .start   (n_start),
      .busy    (n_busy[b]),
      .done    (done_b),
      .y       (n_y[b]),
      .net     (net_unused)
    );

    // Faster bits finish first; remember each bit's done until the LSB's.
    always_ff @(posedge clk) begin
      if (!rst_n || n_start) done_q <= 1'b0;
      else if (done_b)       done_q <= 1'b1;
    end
    assign n_done[b] = done_q | done_b;
  end

endmodule
