// One-bit full adder (FA cell of the partial-product array).
// s = a ^ b ^ cin, cout = majority(a, b, cin). Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end

endmodule : full_adder
