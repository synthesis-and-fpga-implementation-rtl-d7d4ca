// sp_multiplier: two's complement serial-parallel multiplier.
//
// The parallel operand a (A_W bits, two's complement) is held steady; the
// serial operand enters on x, LSB first and sign-extended for as long as the
// product is wanted. The product leaves on p, LSB first, one cycle behind the
// matching x bit: feeding T >= A_W + (serial width) bits yields the exact
// product modulo 2^T, so it can go straight into further bit-serial adders.
//
// One bit-serial adder cell per bit of a (add-shift with shared cells): cell i
// adds the partial-product bit a[i]&x, the sum bit of cell i+1 from the
// previous cycle and its own carry. Sums move one cell towards the LSB per
// cycle and cell 0's sum is the product bit. The sign cell (i = A_W-1) weighs
// all three of its inputs negatively; its own sum flip-flop is fed back as
// its middle input, which is the sign extension of the running partial sum.
// clr is asserted with the LSB of x: sums and carries from the previous
// product are then ignored, so products follow each other without a gap.
//   en : advance one bit      clr : first bit of a new product
//   a  : parallel operand     x   : serial operand bit   p : product bit
// The cell structure follows the document; the handling of the sign cell is
// this design's choice of the two's complement correction.
module sp_multiplier #(
  parameter int unsigned A_W = nadc_pkg::NUM_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           clr,
  input  logic [A_W-1:0] a,
  input  logic           x,
  output logic           p
);

  logic [A_W-1:0] s;      // registered sum of each cell
  logic [A_W-1:0] c;      // carry of each cell; it stays inside its cell, so
                          // these copies of the carry outputs are not read
  logic [A_W-1:0] s_in;   // sum arriving from the next more significant cell
  logic [A_W-1:0] pp;     // partial-product bits

  always_comb begin
    pp = a & {A_W{x}};
    for (int i = 0; i < A_W - 1; i++) s_in[i] = s[i+1] & ~clr;
    s_in[A_W-1] = s[A_W-1] & ~clr;
  end

  for (genvar i = 0; i < A_W; i++) begin : g_cell
    bit_serial_adder u_bsa (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .clr  (clr),
      .a    (pp[i]),
      .b    (s_in[i]),
      .s    (s[i]),
      .co   (c[i])
    );
  end

  assign p = s[0];

endmodule
