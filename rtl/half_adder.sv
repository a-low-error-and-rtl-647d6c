// One-bit half adder (HA cell of the partial-product array).
// s = a ^ b, c = a & b. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  always_comb begin
    s = a ^ b;
    c = a & b;
  end

endmodule : half_adder
