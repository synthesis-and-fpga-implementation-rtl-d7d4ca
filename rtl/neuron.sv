// neuron: McCulloch-Pitts neuron y = H(b + sum_i w_i * x_i), bit-serial.
//
// The N_IN inputs sit in an input RAM, the bias and weights in a weight ROM
// (word 0 = bias, word i = weight of input i-1). A computation runs N_IN+1
// terms; term 0 multiplies the bias by a constant +1.0, term i multiplies
// input i-1 by its weight. For each term the weight is the parallel operand
// of the serial-parallel multiplier and the input, converted to two's
// complement, is shifted in LSB first and sign-extended over ACC_W cycles.
// The product stream is added by a bit-serial adder into a circulating
// ACC_W-bit accumulator (the adder's sum flip-flop plus an ACC_W-1 bit shift
// register), so terms follow each other without gaps. The activation is a
// comparator against zero: after the last bit the accumulator's sign bit is
// in the adder's sum flip-flop and y = 1 when the sum is >= 0.
//
// Units: inputs and weights are in 1/32, products and the accumulator in
// 1/1024. ACC_W = 18 + clog2(N_IN+1) bits cannot overflow.
//
// Interface and timing:
//   in_we/in_waddr/in_wdata : write port of the input RAM (any time the
//                             neuron is idle)
//   start : sampled while idle, begins a computation (ignored when busy)
//   busy  : high from the cycle after start until done
//   done  : one-cycle pulse, (N_IN+1)*ACC_W + 2 cycles after start was
//           sampled; y and net are valid from then until the next start
//   y     : activation output (1 when net >= 0)
//   net   : the accumulated sum b + sum w*x, signed, LSB = 1/1024
// The datapath (RAM, EEPROM, serial-parallel multiplier, serial adder,
// comparator) follows the document; word sizes of the accumulator, the
// term order, the handshake and H(0) = 1 are this design's choices.
module neuron
  import nadc_pkg::*;
#(
  parameter int unsigned N_IN  = 1,
  parameter int unsigned ACC_W = acc_width(N_IN),
  parameter sm_t [N_IN:0] WEIGHTS = '0,
  localparam int unsigned AW = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int unsigned JW = $clog2(N_IN + 1),
  localparam int unsigned PW = $clog2(ACC_W)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_we,
  input  logic [AW-1:0]           in_waddr,
  input  sm_t                     in_wdata,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic                    y,
  output logic signed [ACC_W-1:0] net
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH, S_RESULT} state_t;

  state_t          state;
  logic [JW-1:0]   j;          // term index, 0 = bias
  logic [PW-1:0]   p;          // bit position within the term
  tc_t             x_sr;       // serial operand shift register
  tc_t             w_q;        // parallel operand
  sm_t             ram_q, rom_q;
  tc_t             ram_tc, rom_tc;
  logic [AW-1:0]   ram_addr;
  logic [JW:0]     rom_addr;
  logic            mul_p;
  logic            last_bit;

  // Accumulator side, one cycle behind the multiplier.
  logic            v_d, first_d, p0_d;
  logic            acc_s, acc_b;
  logic            acc_co;     // carry stays inside the adder; not read here
  logic [ACC_W-2:0] acc_sr;

  input_ram #(.DEPTH(N_IN), .AW(AW)) u_ram (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (in_we && !busy),
    .waddr(in_waddr),
    .wdata(in_wdata),
    .raddr(ram_addr),
    .rdata(ram_q)
  );

  weight_rom #(.DEPTH(N_IN + 1), .AW(JW + 1), .CONTENTS(WEIGHTS)) u_rom (
    .raddr(rom_addr),
    .rdata(rom_q)
  );

  sm_to_twos u_cvt_x (.sm(ram_q), .tc(ram_tc));
  sm_to_twos u_cvt_w (.sm(rom_q), .tc(rom_tc));

  // Operands of the next term: input j (term j+1) and weight word j+1.
  always_comb begin
    ram_addr = AW'(j);
    rom_addr = (state == S_IDLE) ? '0 : (JW+1)'(j) + 1'b1;
    last_bit = (p == PW'(ACC_W - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      j     <= '0;
      p     <= '0;
      x_sr  <= '0;
      w_q   <= '0;
      done  <= 1'b0;
      y     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          j     <= '0;
          p     <= '0;
          x_sr  <= tc_t'(SM_ONE.mag);   // bias input +1.0
          w_q   <= rom_tc;
        end
        S_RUN: begin
          if (last_bit) begin
            p <= '0;
            if (j == JW'(N_IN)) begin
              state <= S_FLUSH;
            end else begin
              j    <= j + 1'b1;
              x_sr <= ram_tc;
              w_q  <= rom_tc;
            end
          end else begin
            p    <= p + 1'b1;
            x_sr <= x_sr >>> 1;           // sign-extends the serial operand
          end
        end
        S_FLUSH: state <= S_RESULT;
        S_RESULT: begin
          state <= S_IDLE;
          y     <= ~acc_s;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  sp_multiplier #(.A_W(NUM_W)) u_mul (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (state == S_RUN),
    .clr  (p == '0),
    .a    (w_q),
    .x    (x_sr[0]),
    .p    (mul_p)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_d     <= 1'b0;
      first_d <= 1'b0;
      p0_d    <= 1'b0;
    end else begin
      v_d     <= (state == S_RUN);
      first_d <= (j == '0);
      p0_d    <= (p == '0);
    end
  end

  // The first term starts from an empty accumulator.
  assign acc_b = first_d ? 1'b0 : acc_sr[0];

  bit_serial_adder u_acc (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (v_d),
    .clr  (p0_d),
    .a    (mul_p),
    .b    (acc_b),
    .s    (acc_s),
    .co   (acc_co)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)   acc_sr <= '0;
    else if (v_d) acc_sr <= {acc_s, acc_sr[ACC_W-2:1]};
  end

  // After the last bit the whole sum is in the sum flip-flop and shift register.
  always_ff @(posedge clk) begin
    if (!rst_n)                    net <= '0;
    else if (state == S_RESULT)    net <= {acc_s, acc_sr};
  end

endmodule
