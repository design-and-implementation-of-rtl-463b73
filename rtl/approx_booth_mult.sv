// Approximate 8x8 signed radix-4 Booth multiplier.
//
// out = x * y (two's complement, 16 bits), computed approximately. x is the
// multiplicand, y the multiplier. Purely combinational: no clock, the product
// is valid one propagation delay after the operands.
//
// How it works
//   1. Booth recoding. y is cut into four overlapping 3-bit groups
//      {y[2i+1], y[2i], y[2i-1]} (y[-1] = 0). Each group selects a digit in
//      {-2,-1,0,+1,+2}; four booth_pp_gen cells turn x into four 9-bit
//      one's-complement rows pp[i] plus a +1 bit neg[i] for each negative row.
//      Row i has weight 4^i, i.e. it is shifted left by 2i columns.
//   2. Stage 1 (the dot diagram of the design). Only bits pp[i][7:0] of the
//      four rows are reduced here, column by column:
//        columns 4, 5, 8, 9 : three bits  -> full adder
//        columns 6, 7       : four bits   -> approximate 4:2 compressor
//        columns 10, 11     : two bits    -> half adder
//        columns 0-3, 12, 13: passed on unchanged
//      The compressor inputs are taken top row first: w = pp0, x = pp1,
//      y = pp2, z = pp3. The compressors are the only inexact cells, so the
//      error is confined to columns 6 and 7.
//   3. Sign handling. The sign bit s[i] = pp[i][8] of every row is rewritten
//      as -s[i]*2^8 = ~s[i]*2^8 - 2^8, so no sign extension is needed: a
//      correction row carries ~s[i] at column 8+2i and neg[i] at column 2i,
//      and the constant -(2^8 + 2^10 + 2^12 + 2^14) mod 2^16 = 16'hAB00 is
//      added at the end.
//   4. Stage 2. The stage-1 sum row, the stage-1 carry row and the correction
//      row are reduced once more, column by column: a full adder where all
//      three rows have a bit, a half adder where two do, a wire where one does.
//   5. Final adder. The two stage-2 rows and the constant are added by a
//      carry-propagate adder (written as `+`) into the 16-bit product.
//
// Result: out = x*y + e, with e <= 0 the sum over columns c = 6, 7 of
// (pp0 | pp1 | pp2 bits) - (pp0 + pp1 + pp2 bits), times 2^c. Replacing the
// compressors by exact 4:2 counters would make the product exact.
//
// The recoding table, the four 8-bit rows shifted by two columns, and the
// stage-1 assignment of full adders, half adders and compressors follow the
// described architecture. The 9th partial-product bit, the sign-handling
// correction row and constant, the FA/HA/wire rule of stage 2 and the final
// adder are this design's own way of making the result a correct signed
// product; the described stage 2 differs in its carry bookkeeping.
module approx_booth_mult
  import booth_pkg::*;
(
  input  logic [7:0]  x,    // multiplicand, two's complement
  input  logic [7:0]  y,    // multiplier, two's complement
  output logic [15:0] out   // approximate product, two's complement
);

  localparam int unsigned N   = 8;   // operand width of the dot diagram
  localparam int unsigned NPP = 4;   // radix-4 Booth rows for 8-bit operands
  localparam int unsigned W   = 16;  // product width
  localparam logic [W-1:0] SIGN_CONST = 16'hAB00;  // -(2^8+2^10+2^12+2^14) mod 2^16

  // Which columns of the three stage-2 input rows carry a signal (column 15
  // holds none).
  localparam logic [W-2:0] MASK_A = 15'h3FFF;  // stage-1 sums and passed bits, cols 0-13
  localparam logic [W-2:0] MASK_B = 15'h1FEC;  // stage-1 carries and passed bits, cols 2,3,5-12
  localparam logic [W-2:0] MASK_C = 15'h5555;  // neg bits (0,2,4,6) and ~sign bits (8..14)

  // ---- Booth recoding and partial products -------------------------------
  logic [2:0]  grp [NPP];
  booth_sel_t  sel [NPP];
  logic [N:0]  pp  [NPP];
  logic [NPP-1:0] neg;

  always_comb begin
    grp[0] = {y[1], y[0], 1'b0};
    for (int i = 1; i < NPP; i++) grp[i] = y[2*i+1 -: 3];
  end

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    booth_encoder u_enc (.grp(grp[i]), .sel(sel[i]));
    booth_pp_gen #(.N(N)) u_ppg (.m(x), .sel(sel[i]), .pp(pp[i]), .neg_bit(neg[i]));
  end

  // ---- Stage 1 ------------------------------------------------------------
  // s1[c] is the sum bit a stage-1 cell leaves at column c, c1[c] the carry
  // it leaves at column c (produced by the cell in column c-1).
  logic [11:4] s1;
  logic [12:5] c1;

  full_adder u_fa4 (.a(pp[0][4]), .b(pp[1][2]), .cin(pp[2][0]), .s(s1[4]), .cout(c1[5]));
  full_adder u_fa5 (.a(pp[0][5]), .b(pp[1][3]), .cin(pp[2][1]), .s(s1[5]), .cout(c1[6]));

  approx_compressor u_cmp6 (.w(pp[0][6]), .x(pp[1][4]), .y(pp[2][2]), .z(pp[3][0]),
                            .sum(s1[6]), .carry(c1[7]));
  approx_compressor u_cmp7 (.w(pp[0][7]), .x(pp[1][5]), .y(pp[2][3]), .z(pp[3][1]),
                            .sum(s1[7]), .carry(c1[8]));

  full_adder u_fa8 (.a(pp[1][6]), .b(pp[2][4]), .cin(pp[3][2]), .s(s1[8]), .cout(c1[9]));
  full_adder u_fa9 (.a(pp[1][7]), .b(pp[2][5]), .cin(pp[3][3]), .s(s1[9]), .cout(c1[10]));

  half_adder u_ha10 (.a(pp[2][6]), .b(pp[3][4]), .s(s1[10]), .c(c1[11]));
  half_adder u_ha11 (.a(pp[2][7]), .b(pp[3][5]), .s(s1[11]), .c(c1[12]));

  // Rows handed to stage 2.
  logic [W-2:0] row_a, row_b, row_c;

  always_comb begin
    row_a        = '0;
    row_a[3:0]   = pp[0][3:0];
    row_a[11:4]  = s1[11:4];
    row_a[13:12] = pp[3][7:6];

    row_b        = '0;
    row_b[3:2]   = pp[1][1:0];
    row_b[12:5]  = c1[12:5];

    row_c        = '0;
    for (int i = 0; i < NPP; i++) begin
      row_c[2*i]   = neg[i];
      row_c[N+2*i] = ~pp[i][N];
    end
  end

  // ---- Stage 2 ------------------------------------------------------------
  // Column 15 holds no bit of any row; its product bit comes from the final
  // adder alone.
  logic [W-2:0] s2, c2;  // c2[c] has weight 2^(c+1)

  for (genvar c = 0; c < W-1; c++) begin : g_st2
    localparam int unsigned H = int'(MASK_A[c]) + int'(MASK_B[c]) + int'(MASK_C[c]);
    if (H == 3) begin : g_fa
      full_adder u_fa (.a(row_a[c]), .b(row_b[c]), .cin(row_c[c]), .s(s2[c]), .cout(c2[c]));
    end else if (H == 2) begin : g_ha
      // The two rows present in this column, chosen at elaboration time.
      half_adder u_ha (.a(MASK_A[c] ? row_a[c] : row_b[c]),
                       .b(MASK_C[c] ? row_c[c] : row_b[c]),
                       .s(s2[c]), .c(c2[c]));
    end else begin : g_wire
      assign s2[c] = row_a[c] | row_b[c] | row_c[c];  // at most one is non-zero
      assign c2[c] = 1'b0;
    end
  end

  // ---- Final carry-propagate adder ---------------------------------------
  always_comb out = {1'b0, s2} + {c2, 1'b0} + SIGN_CONST;

endmodule
