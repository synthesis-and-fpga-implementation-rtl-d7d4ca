// bit_serial_adder: one full adder with a flip-flop on its sum and one on its
// carry.
//
// Two words enter LSB first, one bit per enabled cycle, and their sum leaves
// LSB first from the sum flip-flop one cycle later, so a word of n bits is
// added in n cycles. The carry flip-flop feeds the carry back to the next bit.
// clr marks the first bit of a word: the stored carry is then ignored, so
// words can follow each other without a gap.
//   en  : advance one bit (flip-flops hold otherwise)
//   clr : current bits are the LSBs of a new word
//   a,b : operand bits
//   s   : registered sum bit (bit k of the sum is here after the cycle that
//         presented bit k)
//   co  : registered carry
// Structure as in the document; the clr input and the synchronous
// active-low reset are this design's additions.
module bit_serial_adder (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic clr,
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);

  logic cin, sum, carry;

  always_comb begin
    cin          = co & ~clr;
    {carry, sum} = {1'b0, a} + {1'b0, b} + {1'b0, cin};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s  <= 1'b0;
      co <= 1'b0;
    end else if (en) begin
      s  <= sum;
      co <= carry;
    end
  end

endmodule
