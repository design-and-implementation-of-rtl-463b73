// End-to-end testbench for approx_booth_top at its default parameters.
//
// Approximate multiplier: every one of the 65,536 operand pairs, compared with
// an integer model (exact product plus the compressor error of columns 6 and
// 7, worked out from the Booth digits). Sequential Booth unit: every 4-bit
// operand pair, compared with the integer product, and the latency from the
// start cycle to done must be 4 cycles.
//
// Mechanisms counted (each must occur at least once):
//   - each of the eight Booth groups 000..111 selecting a digit,
//   - a compressor under-counting (an inexact product) and an exact product,
//   - in the sequential unit: an add step (01), a subtract step (10) and a
//     shift-only step (00 or 11), seen on the unit's Q[0] and Q-1 registers.
module tb_approx_booth_top;

  localparam int SEQ_N = 4;
  localparam int SEQ_P = 2 * SEQ_N;

  logic [7:0]  x, y;
  logic [15:0] out;
  logic clk;
  logic rst_n, start, busy, done;
  logic [SEQ_N-1:0] multiplicand, multiplier;
  logic [SEQ_P-1:0] product;

  int checks = 0, failures = 0;
  int grp_seen [8];
  int n_exact = 0, n_approx = 0;
  int n_add, n_sub, n_shift_only;

  approx_booth_top dut (
    .x(x), .y(y), .out(out),
    .clk(clk), .rst_n(rst_n), .start(start), .multiplicand(multiplicand),
    .multiplier(multiplier), .busy(busy), .done(done), .product(product)
  );

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

  // Count the sequential unit's iteration kinds.
  always @(posedge clk) begin
    if (rst_n && busy) begin
      unique case ({dut.u_seq.q[0], dut.u_seq.q_m1})
        2'b01:   n_add <= n_add + 1;
        2'b10:   n_sub <= n_sub + 1;
        default: n_shift_only <= n_shift_only + 1;
      endcase
    end
  end

  function automatic int model_error(logic [7:0] xv, logic [7:0] yv);
    logic [8:0] ybits;
    logic [8:0] row [4];
    int err = 0;
    ybits = {yv, 1'b0};
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

  task automatic run_seq(logic [SEQ_N-1:0] a, logic [SEQ_N-1:0] b);
    int cycles = 0;
    @(negedge clk);
    multiplicand = a; multiplier = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      @(negedge clk);
      cycles++;
      if (cycles > 4 * SEQ_N) break;
    end
    checks++;
    if (product != SEQ_P'(int'($signed(a)) * int'($signed(b))) || cycles != SEQ_N) begin
      failures++;
      if (failures < 10)
        $display("FAIL seq %0d*%0d -> %0d after %0d cycles", $signed(a), $signed(b),
                 $signed(product), cycles);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; multiplicand = '0; multiplier = '0;
    n_add = 0; n_sub = 0; n_shift_only = 0;
    x = '0; y = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Approximate multiplier, exhaustive.
    for (int v = 0; v < 65536; v++) begin
      int exact_p, err;
      logic [8:0] ybits;
      x = v[15:8];
      y = v[7:0];
      #1;
      ybits = {y, 1'b0};
      for (int i = 0; i < 4; i++) grp_seen[ybits[2*i+:3]]++;
      exact_p = int'($signed(x)) * int'($signed(y));
      err     = model_error(x, y);
      checks++;
      if (out != 16'(exact_p + err)) begin
        failures++;
        if (failures < 10)
          $display("FAIL x=%0d y=%0d -> %0d, want %0d", $signed(x), $signed(y),
                   $signed(out), exact_p + err);
      end
      if (err == 0) n_exact++; else n_approx++;
    end

    // Sequential Booth unit, exhaustive at its default width.
    for (int v = 0; v < (1 << SEQ_P); v++) run_seq(v[SEQ_P-1:SEQ_N], v[SEQ_N-1:0]);

    for (int g = 0; g < 8; g++) begin
      checks++;
      if (grp_seen[g] == 0) begin
        failures++;
        $display("FAIL Booth group %03b never occurred", 3'(g));
      end
    end
    checks++;
    if (n_exact == 0 || n_approx == 0) begin
      failures++;
      $display("FAIL exact products %0d, approximate %0d", n_exact, n_approx);
    end
    checks++;
    if (n_add == 0 || n_sub == 0 || n_shift_only == 0) begin
      failures++;
      $display("FAIL sequential steps: add %0d, subtract %0d, shift only %0d",
               n_add, n_sub, n_shift_only);
    end
    $display("Booth groups 000..111 seen: %0d %0d %0d %0d %0d %0d %0d %0d",
             grp_seen[0], grp_seen[1], grp_seen[2], grp_seen[3],
             grp_seen[4], grp_seen[5], grp_seen[6], grp_seen[7]);
    $display("products exact %0d, approximate %0d; sequential add %0d, subtract %0d, shift only %0d",
             n_exact, n_approx, n_add, n_sub, n_shift_only);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
