// Radix-4 Booth partial-product generator.
//
// Forms one partial product row from the signed multiplicand `m` (N bits) and
// the Booth selection `sel`:
//   one -> m sign-extended to N+1 bits
//   two -> m shifted left by one (N+1 bits)
//   neither -> zero
// and, when `neg` is set, inverts every bit of that row. The inversion gives
// the one's complement; the +1 that completes the two's complement is not
// added here but returned as `neg_bit`, to be added by the reduction tree at
// the row's least significant column. `pp` is therefore an N+1-bit signed
// value with value(pp) + neg_bit = digit * m. Purely combinational.
//
// Selecting the multiplicand or its two's complement, shifted or not, is the
// Booth recoding the multiplier is built on; handing the +1 to the tree rather
// than using an adder per row is this design's choice.
module booth_pp_gen
  import booth_pkg::*;
#(
  parameter int unsigned N = 8  // multiplicand width
) (
  input  logic [N-1:0] m,
  input  booth_sel_t   sel,
  output logic [N:0]   pp,       // one's-complement partial product, bit N is its sign
  output logic         neg_bit   // +1 owed at the row's LSB column
);

  logic [N:0] mag;  // selected multiple before inversion

  always_comb begin
    if (sel.two)      mag = {m, 1'b0};
    else if (sel.one) mag = {m[N-1], m};
    else              mag = '0;
    pp      = sel.neg ? ~mag : mag;
    neg_bit = sel.neg;
  end

endmodule
