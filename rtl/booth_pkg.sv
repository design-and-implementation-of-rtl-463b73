// Shared types and helpers for the Booth multipliers.
//
// booth_sel_t is the recoded form of one radix-4 Booth digit. A digit d in
// {-2,-1,0,+1,+2} is carried as three flags: `one` (|d| = 1), `two` (|d| = 2)
// and `neg` (d < 0). The table it implements (group {y[2i+1], y[2i], y[2i-1]}
// -> digit) is the standard radix-4 recoding table:
//   000 -> 0, 001 -> +1, 010 -> +1, 011 -> +2,
//   100 -> -2, 101 -> -1, 110 -> -1, 111 -> 0.
// The groups 000 and 111 both give zero with neg = 0, so a zero digit never
// needs a two's-complement correction bit.
package booth_pkg;

  typedef struct packed {
    logic neg;  // digit is negative: invert the selected multiple, add 1 at its LSB
    logic one;  // |digit| = 1: select the multiplicand
    logic two;  // |digit| = 2: select the multiplicand shifted left by one
  } booth_sel_t;

endpackage
