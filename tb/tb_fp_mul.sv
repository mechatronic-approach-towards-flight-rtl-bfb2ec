// Self-checking testbench of fp_mul: random operands over a wide exponent
// range, significands close to 2 (rounding carries), exact ties, and the special values,
// each compared with a double-precision reference rounded to binary32.
// Also checks the one-cycle latency of the handshake.
module tb_fp_mul;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] a = '0, b = '0, result;
  logic        done;
  int          checks = 0, failures = 0;

  fp_mul dut (.clk, .rst_n, .start, .a, .b, .result, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] x, input logic [31:0] y, input logic [31:0] exp_r);
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (!done || result !== exp_r) begin
      failures++;
      if (failures < 10)
        $display("FAIL mul %h * %h: got %h (done %0b), expected %h", x, y, result, done, exp_r);
    end
  endtask

  task automatic check_rand(input logic [31:0] x, input logic [31:0] y);
    run(x, y, r2f(f2r(x) * f2r(y)));
  endtask

  initial begin
    logic [31:0] x, y;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // exact small cases
    run(32'h3F80_0000, 32'h3F80_0000, 32'h3F80_0000);   // 1 * 1 = 1
    run(32'h4040_0000, 32'hBF80_0000, 32'hC040_0000);   // 3 * -1 = -3
    run(32'h4040_0000, 32'h4040_0000, 32'h4110_0000);   // 3 * 3 = 9
    // special values
    run(32'h7F80_0000, 32'h3F80_0000, 32'h7F80_0000);   // inf * 1
    run(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000);   // inf * 0
    run(32'h7FC0_0001, 32'h3F80_0000, 32'h7FC0_0000);   // NaN
    run(32'h8000_0000, 32'h4120_0000, 32'h8000_0000);   // -0 * 10
    run(32'h7F00_0000, 32'h7F00_0000, 32'h7F80_0000);   // overflow
    run(32'h0080_0000, 32'h0080_0000, 32'h0000_0000);   // underflow to zero
    // random, wide range
    for (int i = 0; i < 4000; i++) check_rand(rnd_f(66, 188), rnd_f(66, 188));
    // random, close exponents (alignment and rounding)
    for (int i = 0; i < 4000; i++) begin
      x = rnd_f(100, 140);
      y = rnd_f(int'(x[30:23]) - 3 < 1 ? 1 : int'(x[30:23]) - 3, int'(x[30:23]) + 3);
      check_rand(x, y);
    end
    // random, full significand patterns near 1.0
    for (int i = 0; i < 4000; i++) begin
      x = rnd_f(126, 128);
      y = {1'($urandom), 8'd127, 23'h7FFFFF ^ 23'($urandom_range(255))};
      check_rand(x, y);
    end
    // exact ties: an odd significand times 1.5 lies halfway between two
    // representable numbers, so ties-to-even decides the last bit
    for (int i = 0; i < 2000; i++) begin
      x = rnd_f(100, 150);
      x[0] = 1'b1;
      y = {1'($urandom), 8'(120 + $urandom_range(10)), 23'h400000};
      check_rand(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
