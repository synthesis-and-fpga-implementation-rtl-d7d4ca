// nadc_pkg: number format and constants shared by the neural nonlinear ADC.
//
// Numbers (inputs, weights, biases) use a 9-bit sign-magnitude code: one sign
// bit, 1 for plus and 0 for minus, followed by an 8-bit magnitude whose bits
// weigh 4, 2, 1, 0.5, ..., 0.03125. The representable range is therefore
// -7.96875 .. +7.96875 in steps of 1/32. Inside the neuron the arithmetic is
// two's complement, so a code becomes a 9-bit signed integer in units of 1/32.
//
// The package also holds the default network contents. The trained weights of
// the original network are not published, so the defaults build the network
// that the published neuron counts (1, 3, 7, 15, 31, 63 hidden neurons behind
// the bits MSB..LSB) describe exactly: 63 hidden comparators on the input at
// 63 increasing thresholds (a thermometer code), and per output bit an
// alternating +1/-1 sum over every 2^(i-1)-th comparator minus 0.5.
// The threshold curve is this design's stand-in for a thermistor bridge
// characteristic: t(k) = floor(k*(384-2k)/64) input steps, k = 1..63, a
// concave curve whose step shrinks from 6 to 2 input LSBs.
package nadc_pkg;

  localparam int unsigned MAG_W   = 8;          // magnitude bits
  localparam int unsigned NUM_W   = MAG_W + 1;  // code and two's complement width
  localparam int unsigned FRAC_W  = 5;          // magnitude LSB = 2^-5
  localparam int unsigned PROD_W  = 2 * NUM_W;  // full product width

  localparam int unsigned ADC_BITS = 6;                     // output bits
  localparam int unsigned N_HIDDEN = (1 << ADC_BITS) - 1;   // 63 hidden neurons

  typedef struct packed {
    logic             pos;   // 1 = plus, 0 = minus
    logic [MAG_W-1:0] mag;   // magnitude, LSB = 1/32
  } sm_t;

  typedef logic signed [NUM_W-1:0] tc_t;

  localparam sm_t SM_ZERO     = '{pos: 1'b1, mag: 8'd0};
  localparam sm_t SM_ONE      = '{pos: 1'b1, mag: MAG_W'(1 << FRAC_W)};  // +1.0
  localparam sm_t SM_MINUS1   = '{pos: 1'b0, mag: 8'd32};   // -1.0
  localparam sm_t SM_MINUSH   = '{pos: 1'b0, mag: 8'd16};   // -0.5

  // Accumulator width for a neuron with n_in inputs plus the bias term:
  // a full product plus enough guard bits for n_in+1 products.
  function automatic int unsigned acc_width(int unsigned n_in);
    return PROD_W + $clog2(n_in + 1);
  endfunction

  // Cycles from the cycle a neuron samples start to the cycle done is high.
  function automatic int unsigned neuron_latency(int unsigned n_in);
    return (n_in + 1) * acc_width(n_in) + 2;
  endfunction

  // Inputs of the neuron behind output bit b (b = 0 is the LSB): 2^(6-b)-1.
  function automatic int unsigned out_fanin(int unsigned b);
    return (1 << (ADC_BITS - b)) - 1;
  endfunction

  // Hidden neuron (0-based) feeding input j (0-based) of output bit b.
  function automatic int unsigned out_src(int unsigned b, int unsigned j);
    return (j + 1) * (1 << b) - 1;
  endfunction

  // Default hidden threshold k (1..63), in input LSBs (1/32).
  function automatic int unsigned threshold(int unsigned k);
    return (k * (384 - 2 * k)) / 64;
  endfunction

  typedef sm_t [1:0]        hidden_w_t;                 // bias, weight
  typedef hidden_w_t [N_HIDDEN-1:0] hidden_layer_w_t;
  typedef sm_t [N_HIDDEN:0] out_w_t;                    // bias, 63 weights
  typedef out_w_t [ADC_BITS-1:0]    out_layer_w_t;

  // Sign-magnitude code of a signed value in units of 1/32 (|v| <= 255).
  function automatic sm_t to_sm(int v);
    sm_t r;
    r.pos = (v >= 0);
    r.mag = MAG_W'(v >= 0 ? v : -v);
    return r;
  endfunction

  // Default hidden layer: neuron k-1 fires when vin >= threshold(k),
  // weight +1.0 and bias -threshold(k).
  function automatic hidden_layer_w_t default_hidden_weights();
    hidden_layer_w_t w;
    for (int unsigned k = 1; k <= N_HIDDEN; k++) begin
      w[k-1][0] = to_sm(-int'(threshold(k)));
      w[k-1][1] = SM_ONE;
    end
    return w;
  endfunction

  // Default output layer: bit b sums its out_fanin(b) hidden inputs with
  // weights +1, -1, +1, ... and bias -0.5; unused words are +0.
  function automatic out_layer_w_t default_output_weights();
    out_layer_w_t w;
    for (int unsigned b = 0; b < ADC_BITS; b++) begin
      for (int unsigned j = 0; j <= N_HIDDEN; j++) w[b][j] = SM_ZERO;
      w[b][0] = SM_MINUSH;
      for (int unsigned j = 0; j < out_fanin(b); j++)
        w[b][j+1] = (j % 2 == 0) ? SM_ONE : SM_MINUS1;
    end
    return w;
  endfunction

  // ROM image of the LSB output neuron (64 words), the largest weight store.
  function automatic out_w_t default_lsb_weights();
    out_layer_w_t w;
    w = default_output_weights();
    return w[0];
  endfunction

endpackage
