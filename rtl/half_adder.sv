// One-bit half adder.
//
// Adds two equally weighted bits a and b. s = a'b + ab' (exclusive OR) and
// c = ab, exactly as the textbook equations give them. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,  // sum, same weight as the inputs
  output logic c   // carry, twice the weight of the inputs
);

  always_comb begin
    s = (~a & b) | (a & ~b);
    c = a & b;
  end

endmodule
