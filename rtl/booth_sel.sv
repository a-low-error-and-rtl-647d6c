// Booth partial-product bit selector ("sel").
//
// Produces bit j of a radix-4 Booth partial-product row from the row's
// control word: a_j when the row selects A, a_(j-1) when it selects 2A,
// 0 for a zero digit, and the complement of that choice when the row is
// negative (the one's complement; the +1 that completes the negation
// belongs to the row's least significant column). For the row's top
// (sign) position the caller ties a_j to the multiplicand's sign bit.
// Combinational. The function follows the published design; the AND-OR-XOR
// gate arrangement is this design's.
module booth_sel
  import fwb_pkg::*;
(
  input  booth_ctrl_t ctrl,  // from the row's Booth encoder
  input  logic        a_j,   // multiplicand bit used for +-A
  input  logic        a_jm1, // multiplicand bit used for +-2A
  output logic        pp     // partial-product bit S_(i,j)
);

  always_comb pp = ((ctrl.one & a_j) | (ctrl.two & a_jm1)) ^ ctrl.neg;

endmodule : booth_sel
