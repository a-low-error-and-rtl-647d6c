// Error-compensation bit of the fixed-width Booth multiplier.
//
// The "main" column is the most significant column of the discarded half of
// the product (weight 2^(n-1)); it holds one partial-product bit per Booth
// row, S_(i,n-1-2i). The multiplier adds those bits one column higher (at
// weight 2^n) and adds this block's output there as well, in place of the
// constant 1 of the sign-generate extension. The output is 0 only when every
// main bit is 1 (theta = n/2). Measured against the exactly sign-extended
// high half of the product, the bias added at weight 2^n is therefore
//   theta      when theta < n/2,     theta - 1  when theta = n/2,
// which matches the mean of the discarded low half in each of the two
// threshold classes (about 0 and -1 units of 2^n for n = 8).
// For n = 8 (ROWS = 4) it is a chain of three two-input ANDs, as published,
// followed by the complement; the complement is this design's reading,
// chosen because it reproduces the published error statistics exactly.
// Combinational.
module fwb_comp #(
  parameter int unsigned ROWS = 4  // Booth rows, n/2
) (
  input  logic [ROWS-1:0] main_bits,  // S_(i,n-1-2i), i = 0..ROWS-1
  output logic            comp        // bit added at weight 2^n
);

  // chain[k] = AND of main_bits[k:0], one two-input gate per stage
  logic [ROWS-1:0] chain;

  assign chain[0] = main_bits[0];
  for (genvar k = 1; k < ROWS; k++) begin : g_and
    assign chain[k] = chain[k-1] & main_bits[k];
  end

  assign comp = ~chain[ROWS-1];

endmodule : fwb_comp
