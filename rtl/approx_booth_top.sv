// Top level: the approximate radix-4 Booth multiplier beside the basic
// sequential Booth multiplier.
//
// The two units are independent and share nothing but this wrapper.
//   x, y -> out            : approx_booth_mult, 8x8 signed, combinational,
//                            approximate (compressor-4 in stage 1).
//   clk, rst_n, start,
//   multiplicand,
//   multiplier -> busy,
//   done, product         : booth_seq_mult, N x N signed, exact, one Booth
//                            iteration per clock (N cycles per product).
// The proposed multiplier is the design's main unit; the sequential unit is
// the basic Booth-algorithm reference that the approximate design builds on.
module approx_booth_top #(
  parameter int unsigned SEQ_N = 4  // width of the sequential Booth unit
) (
  // approximate radix-4 Booth multiplier
  input  logic [7:0]         x,
  input  logic [7:0]         y,
  output logic [15:0]        out,
  // basic sequential Booth multiplier
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [SEQ_N-1:0]   multiplicand,
  input  logic [SEQ_N-1:0]   multiplier,
  output logic               busy,
  output logic               done,
  output logic [2*SEQ_N-1:0] product
);

  approx_booth_mult u_mult (.x(x), .y(y), .out(out));

  booth_seq_mult #(.N(SEQ_N)) u_seq (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (start),
    .multiplicand (multiplicand),
    .multiplier   (multiplier),
    .busy         (busy),
    .done         (done),
    .product      (product)
  );

endmodule
