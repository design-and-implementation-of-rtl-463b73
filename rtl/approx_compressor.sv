// Approximate 4:2 compressor ("compressor-4").
//
// Takes four equally weighted bits w, x, y, z and returns a sum bit (same
// weight) and a carry bit (double weight), with no carry-in and no carry-out,
// so a column of these cells never ripples. The first three inputs are merged
// into one bit, g = w | x | y, and g is then half-added to z:
//   sum   = g ^ z
//   carry = g & z
// so the cell outputs g + z instead of the exact count w + x + y + z. It is
// exact whenever at most one of w, x, y is set; otherwise it under-counts by
// (w + x + y) - 1. Combinational, two gate levels.
//
// The merge-then-half-add structure and the four input names follow the
// published compressor-4 circuit; the merge function comes from the published
// truth table of the approximate cell, which counts the input pair (1,1) as a
// single one. Extending that two-input merge to the three inputs w, x, y is
// this design's own reading of the circuit, whose first gate has three inputs.
module approx_compressor (
  input  logic w,
  input  logic x,
  input  logic y,
  input  logic z,
  output logic sum,
  output logic carry
);

  logic g;  // w, x and y merged into one bit

  always_comb begin
    g     = w | x | y;
    sum   = g ^ z;
    carry = g & z;
  end

endmodule
