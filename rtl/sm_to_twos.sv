// sm_to_twos: sign-magnitude code to two's complement.
//
// The network's numbers are stored as a sign bit (1 = plus, 0 = minus) and an
// 8-bit magnitude in steps of 1/32. The serial-parallel multiplier works in
// two's complement, so this converter negates the zero-extended magnitude when
// the sign bit is 0. Both codes of zero give 0. Purely combinational.
//   sm : input code
//   tc : 9-bit two's complement, LSB = 1/32, range -255..+255
// The code itself is the one of the document; converting it ahead of a two's
// complement multiplier is this design's choice.
module sm_to_twos
  import nadc_pkg::*;
(
  input  sm_t sm,
  output tc_t tc
);

  always_comb begin
    tc = tc_t'({1'b0, sm.mag});
    if (!sm.pos) tc = -tc;
  end

endmodule
