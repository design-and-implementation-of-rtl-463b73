// Self-checking testbench for booth_pp_gen (N = 8): every multiplicand with
// every digit in {-2,-1,0,+1,+2}. The 9-bit signed row plus neg_bit must
// equal digit * m; neg_bit must be set exactly for negative digits.
module tb_booth_pp_gen;
  import booth_pkg::*;

  localparam int N = 8;

  logic [N-1:0] m;
  booth_sel_t   sel;
  logic [N:0]   pp;
  logic         neg_bit;
  int checks = 0, failures = 0;
  logic clk;

  booth_pp_gen #(.N(N)) dut (.m(m), .sel(sel), .pp(pp), .neg_bit(neg_bit));

  initial begin : clock
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = -2; d <= 2; d++) begin
      for (int v = 0; v < (1 << N); v++) begin
        int got, want;
        m   = N'(v);
        sel = '{neg: (d < 0), one: (d == 1 || d == -1), two: (d == 2 || d == -2)};
        #1;
        got  = int'($signed(pp)) + int'(neg_bit);
        want = d * int'($signed(m));
        checks++;
        if (got != want || neg_bit != (d < 0)) begin
          failures++;
          if (failures < 10)
            $display("FAIL m=%0d d=%0d -> pp=%b neg=%b (%0d, want %0d)",
                     $signed(m), d, pp, neg_bit, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
