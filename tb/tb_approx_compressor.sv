// Self-checking testbench for approx_compressor.
//
// Part 1 replays the eight rows of the approximate cell's truth table with
// inputs X1 -> w, X2 -> x, X3 -> z and y = 0; the expected carry and sum are
// the table's approximate columns, typed in by hand.
// Part 2 walks all sixteen input combinations and checks the arithmetic
// contract: 2*carry + sum = (w | x | y) + z, which equals the exact count
// w + x + y + z whenever at most one of w, x, y is set.
module tb_approx_compressor;

  logic w, x, y, z, sum, carry;
  int checks = 0, failures = 0;
  int exact_rows = 0, inexact_rows = 0;
  logic clk;

  // Approximate outputs of the truth table, rows X1X2X3 = 000 .. 111.
  localparam logic [7:0] TABLE_CARRY = 8'b1010_1000;  // bit k = row k
  localparam logic [7:0] TABLE_SUM   = 8'b0101_0110;

  approx_compressor dut (.w(w), .x(x), .y(y), .z(z), .sum(sum), .carry(carry));

  initial begin : clock
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      {w, x, z} = 3'(r);
      y = 1'b0;
      #1;
      checks++;
      if (carry != TABLE_CARRY[r] || sum != TABLE_SUM[r]) begin
        failures++;
        $display("FAIL table row %03b: carry=%b sum=%b, table says %b %b",
                 3'(r), carry, sum, TABLE_CARRY[r], TABLE_SUM[r]);
      end
    end

    for (int v = 0; v < 16; v++) begin
      int merged, exact;
      {w, x, y, z} = 4'(v);
      #1;
      merged = ((w | x | y) ? 1 : 0) + int'(z);
      exact  = int'(w) + int'(x) + int'(y) + int'(z);
      checks++;
      if (2 * int'(carry) + int'(sum) != merged) begin
        failures++;
        $display("FAIL wxyz=%04b -> carry=%b sum=%b", 4'(v), carry, sum);
      end
      if (merged == exact) exact_rows++; else inexact_rows++;
    end
    checks++;
    if (exact_rows != 8 || inexact_rows != 8) begin
      failures++;
      $display("FAIL exact rows %0d, inexact rows %0d", exact_rows, inexact_rows);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
