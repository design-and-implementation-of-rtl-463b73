// Self-checking testbench for booth_encoder: all eight groups. The expected
// digit is worked out arithmetically as d = -2*g[2] + g[1] + g[0] and compared
// with the flags: neg = (d < 0), one = (|d| = 1), two = (|d| = 2).
module tb_booth_encoder;
  import booth_pkg::*;

  logic [2:0] grp;
  booth_sel_t sel;
  int checks = 0, failures = 0;
  logic clk;

  booth_encoder dut (.grp(grp), .sel(sel));

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
    for (int v = 0; v < 8; v++) begin
      int d, mag;
      grp = 3'(v);
      #1;
      d   = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      mag = (d < 0) ? -d : d;
      checks++;
      if (sel.neg != (d < 0) || sel.one != (mag == 1) || sel.two != (mag == 2)) begin
        failures++;
        $display("FAIL grp=%03b digit=%0d -> neg=%b one=%b two=%b",
                 grp, d, sel.neg, sel.one, sel.two);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
