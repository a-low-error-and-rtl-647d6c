// Shared types for the fixed-width radix-4 Booth multiplier.
//
// booth_ctrl_t is the three-wire control word Ctrl_i[2:0] that a Booth
// encoder sends along its partial-product row of selectors:
//   [2] neg : the row is negated (bits inverted; the +1 at the row LSB is the
//             same signal, and is dropped by the fixed-width array)
//   [1] two : the row selects 2A
//   [0] one : the row selects A
// Only the meaning of bit 2 (the "add to LSB" column of the encoding table)
// follows the published description; the split of bits 1:0 into one/two
// one-hot selects is this design's choice.
package fwb_pkg;

  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } booth_ctrl_t;

endpackage : fwb_pkg
