// Self-checking testbench for approx_booth_mult: all 65,536 operand pairs.
//
// The expected product is worked out from integers, not from the RTL's
// structure: the exact product x*y plus the compressor error. For each Booth
// row i the digit d_i = -2*y[2i+1] + y[2i] + y[2i-1] gives the row's
// one's-complement bits (d_i*x, minus one when d_i < 0). In the two
// compressor columns c = 6 and 7 the cell counts (b0 | b1 | b2) + b3 instead
// of b0 + b1 + b2 + b3, where b_i is bit c-2i of row i; the difference times
// 2^c is the error. The test also counts how many products come out exact and
// checks the two worked operand pairs of the design's waveforms produce the
// model's value. The error must never be positive.
module tb_approx_booth_mult;

  logic [7:0]  x, y;
  logic [15:0] out;
  int checks = 0, failures = 0;
  int n_exact = 0, n_approx = 0;
  int max_abs_err = 0;
  longint sum_abs_err = 0;
  logic clk;

  approx_booth_mult dut (.x(x), .y(y), .out(out));

  initial begin : clock
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model: returns the approximate product as a signed integer error term.
  function automatic int model_error(logic [7:0] xv, logic [7:0] yv);
    logic [8:0] ybits;
    logic [8:0] row [4];
    int err = 0;
    ybits = {yv, 1'b0};  // ybits[k+1] = y[k], ybits[0] = y[-1] = 0
    for (int i = 0; i < 4; i++) begin
      int d, v;
      d = -2 * int'(ybits[2*i+2]) + int'(ybits[2*i+1]) + int'(ybits[2*i]);
      v = d * int'($signed(xv));
      if (d < 0) v = v - 1;
      row[i] = 9'(v);
    end
    for (int c = 6; c <= 7; c++) begin
      int b0, b1, b2;
      b0 = int'(row[0][c]);
      b1 = int'(row[1][c-2]);
      b2 = int'(row[2][c-4]);
      err += (((b0 | b1 | b2) != 0 ? 1 : 0) - (b0 + b1 + b2)) * (1 << c);
    end
    return err;
  endfunction

  task automatic check_pair(logic [7:0] xv, logic [7:0] yv);
    int exact_p, err;
    logic [15:0] want;
    x = xv;
    y = yv;
    #1;
    exact_p = int'($signed(xv)) * int'($signed(yv));
    err     = model_error(xv, yv);
    want    = 16'(exact_p + err);
    checks++;
    if (out !== want || err > 0) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=%0d y=%0d -> out=%0d, want %0d (exact %0d)",
                 $signed(xv), $signed(yv), $signed(out), $signed(want), exact_p);
    end
  endtask

  initial begin
    // The two operand pairs shown in the design's waveforms.
    check_pair(8'b0010_0101, 8'b0101_0010);
    check_pair(8'b0101_0010, 8'b0100_0101);

    for (int v = 0; v < 65536; v++) begin
      int err;
      check_pair(v[15:8], v[7:0]);
      err = int'($signed(out)) - int'($signed(x)) * int'($signed(y));
      if (err == 0) n_exact++; else n_approx++;
      if (-err > max_abs_err) max_abs_err = -err;
      sum_abs_err += (err < 0) ? -longint'(err) : longint'(err);
    end

    // The approximation must actually be exercised, and leave most products
    // close: the error is bounded by 2*(2^6 + 2^7) = 384.
    checks++;
    if (n_approx == 0 || n_exact == 0 || max_abs_err > 384) begin
      failures++;
      $display("FAIL exact=%0d approximate=%0d max|err|=%0d", n_exact, n_approx, max_abs_err);
    end
    $display("exact products %0d, approximate %0d, max |error| %0d, mean |error| %0.2f",
             n_exact, n_approx, max_abs_err, real'(sum_abs_err) / 65536.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
