// Self-checking testbench for booth_seq_mult.
//
// Two instances: the default width (4 bits) and an 8-bit one. Each is run
// through every operand pair, and the product is compared with the integer
// product. The number of cycles from the start cycle to done must be exactly
// N (one Booth iteration per clock). The worked 4-bit example (multiplier
// 0100, multiplicand 1011, i.e. 4 * -5) must give 1110_1100. A start pulse
// while the unit is busy must be ignored.
module tb_booth_seq_mult;

  localparam int N4 = 4;
  localparam int N8 = 8;
  localparam int P4 = 2 * N4;  // product widths
  localparam int P8 = 2 * N8;

  logic clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic          start4, busy4, done4;
  logic [N4-1:0] mc4, mp4;
  logic [2*N4-1:0] p4;

  logic          start8, busy8, done8;
  logic [N8-1:0] mc8, mp8;
  logic [2*N8-1:0] p8;

  booth_seq_mult dut4 (.clk(clk), .rst_n(rst_n), .start(start4), .multiplicand(mc4),
                       .multiplier(mp4), .busy(busy4), .done(done4), .product(p4));
  booth_seq_mult #(.N(N8)) dut8 (.clk(clk), .rst_n(rst_n), .start(start8), .multiplicand(mc8),
                                 .multiplier(mp8), .busy(busy8), .done(done8), .product(p8));

  initial begin : clock
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run4(logic [N4-1:0] a, logic [N4-1:0] b, bit poke_start);
    int cycles = 0;
    @(negedge clk);
    mc4 = a; mp4 = b; start4 = 1'b1;
    @(negedge clk);
    start4 = 1'b0;
    cycles = 0;
    while (!done4) begin
      if (poke_start && cycles == 1) begin
        start4 = 1'b1; mc4 = ~a; mp4 = ~b;  // must be ignored while busy
      end else begin
        start4 = 1'b0;
      end
      @(negedge clk);
      cycles++;
      if (cycles > 4 * N4) break;
    end
    start4 = 1'b0;
    checks++;
    if (p4 != P4'(int'($signed(a)) * int'($signed(b))) || cycles != N4) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=4 %0d*%0d -> %0d after %0d cycles", $signed(a), $signed(b),
                 $signed(p4), cycles);
    end
  endtask

  task automatic run8(logic [N8-1:0] a, logic [N8-1:0] b);
    int cycles = 0;
    @(negedge clk);
    mc8 = a; mp8 = b; start8 = 1'b1;
    @(negedge clk);
    start8 = 1'b0;
    cycles = 0;
    while (!done8) begin
      @(negedge clk);
      cycles++;
      if (cycles > 4 * N8) break;
    end
    checks++;
    if (p8 != P8'(int'($signed(a)) * int'($signed(b))) || cycles != N8) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=8 %0d*%0d -> %0d after %0d cycles", $signed(a), $signed(b),
                 $signed(p8), cycles);
    end
  endtask

  initial begin
    rst_n = 1'b0; start4 = 1'b0; start8 = 1'b0;
    mc4 = '0; mp4 = '0; mc8 = '0; mp8 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    checks++;
    if (busy4 || done4 || busy8 || done8) begin
      failures++;
      $display("FAIL not idle after reset");
    end

    // Worked example: Q = 0100 (multiplier), B = 1011 (multiplicand).
    run4(4'b1011, 4'b0100, 1'b0);
    checks++;
    if (p4 != 8'b1110_1100) begin
      failures++;
      $display("FAIL worked example gives %b", p4);
    end

    // Start while busy is ignored.
    run4(4'b0111, 4'b1001, 1'b1);

    for (int v = 0; v < (1 << (2*N4)); v++) run4(v[7:4], v[3:0], 1'b0);
    for (int v = 0; v < (1 << (2*N8)); v++) run8(v[15:8], v[7:0]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
