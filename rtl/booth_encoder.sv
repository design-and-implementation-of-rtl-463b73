// Radix-4 Booth recoder.
//
// Input `grp` is one overlapping group of three multiplier bits,
// {y[2i+1], y[2i], y[2i-1]} (y[-1] = 0 for the first group). Output `sel`
// says which multiple of the multiplicand the group selects:
//   000 -> 0     001 -> +1M   010 -> +1M   011 -> +2M
//   100 -> -2M   101 -> -1M   110 -> -1M   111 -> 0
// (the radix-4 Booth table). `neg` is set only for a non-zero negative digit,
// so groups 000 and 111 give an all-zero selection. Purely combinational.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0] grp,
  output booth_sel_t sel
);

  always_comb begin
    unique case (grp)
      3'b000:  sel = '{neg: 1'b0, one: 1'b0, two: 1'b0};
      3'b001:  sel = '{neg: 1'b0, one: 1'b1, two: 1'b0};
      3'b010:  sel = '{neg: 1'b0, one: 1'b1, two: 1'b0};
      3'b011:  sel = '{neg: 1'b0, one: 1'b0, two: 1'b1};
      3'b100:  sel = '{neg: 1'b1, one: 1'b0, two: 1'b1};
      3'b101:  sel = '{neg: 1'b1, one: 1'b1, two: 1'b0};
      3'b110:  sel = '{neg: 1'b1, one: 1'b1, two: 1'b0};
      default: sel = '{neg: 1'b0, one: 1'b0, two: 1'b0};  // 3'b111
    endcase
  end

endmodule
