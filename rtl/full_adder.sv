// One-bit full adder.
//
// Adds three equally weighted bits a, b and carry-in cin:
//   s    = a ^ b ^ cin
//   cout = ab + b*cin + a*cin  (majority)
// Purely combinational. These are the standard full-adder equations.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,    // sum, same weight as the inputs
  output logic cout  // carry, twice the weight of the inputs
);

  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (b & cin) | (a & cin);
  end

endmodule
