// input_ram: a neuron's input store.
//
// DEPTH words of the 9-bit sign-magnitude code, one synchronous write port
// and one asynchronous read port (a distributed RAM on an FPGA). The neuron
// writes its inputs here before a computation and reads them back one per
// term while it multiplies. Contents are cleared to +0 by reset.
//   we, waddr, wdata : write wdata at waddr on the clock edge
//   raddr, rdata     : read, combinational
// The document names the RAM; port style, depth handling and reset are this
// design's choices.
module input_ram
  import nadc_pkg::*;
#(
  parameter int unsigned DEPTH = 1,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  sm_t           wdata,
  input  logic [AW-1:0] raddr,
  output sm_t           rdata
);

  sm_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= SM_ZERO;
    end else if (we && (int'(waddr) < DEPTH)) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = (int'(raddr) < DEPTH) ? mem[raddr] : SM_ZERO;

endmodule
