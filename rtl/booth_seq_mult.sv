// Sequential radix-2 Booth multiplier.
//
// Multiplies two N-bit two's-complement numbers one multiplier bit per clock,
// following the classic Booth flow:
//   load:   A = 0, Q-1 = 0, B = multiplicand, Q = multiplier, count = N
//   repeat: look at {Q[0], Q-1}: 01 -> A = A + B, 10 -> A = A - B,
//           00 / 11 -> A unchanged; then shift {A, Q, Q-1} right
//           arithmetically by one and decrement count, until count = 0.
//   result: {A, Q}.
// One iteration (add/subtract and shift) takes one clock cycle.
//
// Interface and timing
//   start is sampled while the unit is idle (busy = 0); the operands are
//   captured in that cycle. busy is high for the next N cycles, one per
//   iteration. done pulses high for one cycle together with the last
//   iteration's result, N cycles after the start cycle, and product then holds
//   until the next start. start while busy is ignored. rst_n is an active-low
//   synchronous reset that clears every register.
//
// The flow follows the Booth algorithm as described. The handshake, the reset
// and the one-iteration-per-cycle timing are this design's own choices, and so
// is the accumulator A being one bit wider than N: without that guard bit,
// A + B or A - B overflows when the multiplicand is -2^(N-1).
module booth_seq_mult #(
  parameter int unsigned N = 4  // operand width (the worked example uses 4 bits)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   multiplicand,
  input  logic [N-1:0]   multiplier,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] product
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [N:0]    acc;     // A, with one guard bit
  logic [N-1:0]  q;       // Q
  logic          q_m1;    // Q-1
  logic [N:0]    b;       // B, sign-extended to the accumulator width
  logic [CW-1:0] count;

  logic [N:0]    acc_next;  // A after the add/subtract step

  always_comb begin
    unique case ({q[0], q_m1})
      2'b01:   acc_next = acc + b;
      2'b10:   acc_next = acc - b;
      default: acc_next = acc;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc   <= '0;
      q     <= '0;
      q_m1  <= 1'b0;
      b     <= '0;
      count <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          acc   <= '0;
          q_m1  <= 1'b0;
          b     <= {multiplicand[N-1], multiplicand};
          q     <= multiplier;
          count <= CW'(N);
          busy  <= 1'b1;
        end
      end else begin
        // Arithmetic right shift of {A, Q, Q-1}.
        {acc, q, q_m1} <= {acc_next[N], acc_next, q};
        count          <= count - 1'b1;
        if (count == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign product = {acc[N-1:0], q};

endmodule
