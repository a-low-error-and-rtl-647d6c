// Radix-4 (modified) Booth encoder.
//
// Scans one overlapping multiplier triplet {b[2i+1], b[2i], b[2i-1]} and
// recodes it into the digit d = b[2i-1] + b[2i] - 2*b[2i+1] in {-2..2}, given
// as a control word for the row of selectors:
//   000 -> 0     001 -> +A    010 -> +A    011 -> +2A
//   100 -> -2A   101 -> -A    110 -> -A    111 -> 0
// neg is set exactly for the three negative digits (the "add 1 to LSB"
// column of the encoding table); 111 is a plain zero, not a negated zero.
// Purely combinational. The table follows the published design; the
// one-hot one/two encoding of the other two control bits is this design's.
module booth_encoder
  import fwb_pkg::*;
(
  input  logic [2:0]  triplet,  // {b[2i+1], b[2i], b[2i-1]}
  output booth_ctrl_t ctrl      // Ctrl_i[2:0] = {neg, two, one}
);

  always_comb begin
    ctrl.one = triplet[1] ^ triplet[0];
    ctrl.two = (triplet == 3'b011) || (triplet == 3'b100);
    ctrl.neg = triplet[2] & ~(triplet[1] & triplet[0]);
  end

endmodule : booth_encoder
