// weight_rom: a neuron's weight and bias store.
//
// DEPTH words of the 9-bit sign-magnitude code fixed at elaboration by the
// CONTENTS parameter (word 0 is the bias, word j the weight of input j-1),
// read asynchronously. It stands for the EEPROM of the document: changing the
// network for another sensor only changes these contents.
//   raddr, rdata : read, combinational; addresses past the end read +0
// By default it holds the 64 words of the LSB output neuron, the largest
// store of the network. Holding the contents as a parameter rather than a
// programmable memory is this design's choice.
module weight_rom
  import nadc_pkg::*;
#(
  parameter int unsigned DEPTH = N_HIDDEN + 1,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter sm_t [DEPTH-1:0] CONTENTS = default_lsb_weights()
) (
  input  logic [AW-1:0] raddr,
  output sm_t           rdata
);

  localparam sm_t [DEPTH-1:0] ROM = CONTENTS;

  always_comb begin
    rdata = SM_ZERO;
    for (int i = 0; i < DEPTH; i++) if (int'(raddr) == i) rdata = ROM[i];
  end

endmodule
