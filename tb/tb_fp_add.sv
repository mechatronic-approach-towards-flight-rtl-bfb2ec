// Self-checking testbench of fp_add: random operands over a wide exponent
// range, near-cancelling pairs, operands far apart, and the special values,
// each compared with a double-precision reference rounded to binary32.
// Also checks the one-cycle latency of the handshake.
module tb_fp_add;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] a = '0, b = '0, result;
  logic        done;
  int          checks = 0, failures = 0;

  fp_add dut (.clk, .rst_n, .start, .a, .b, .result, .done);

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
        $display("FAIL add %h + %h: got %h (done %0b), expected %h", x, y, result, done, exp_r);
    end
  endtask

  task automatic check_rand(input logic [31:0] x, input logic [31:0] y);
    run(x, y, r2f(f2r(x) + f2r(y)));
  endtask

  initial begin
    logic [31:0] x, y;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // exact small cases
    run(32'h3F80_0000, 32'h3F80_0000, 32'h4000_0000);   // 1 + 1 = 2
    run(32'h3F80_0000, 32'hBF80_0000, 32'h0000_0000);   // 1 - 1 = +0
    run(32'h4040_0000, 32'hBF80_0000, 32'h4000_0000);   // 3 - 1 = 2
    // special values
    run(32'h7F80_0000, 32'h3F80_0000, 32'h7F80_0000);   // inf + 1
    run(32'h7F80_0000, 32'hFF80_0000, 32'h7FC0_0000);   // inf - inf
    run(32'h7FC0_0001, 32'h3F80_0000, 32'h7FC0_0000);   // NaN
    run(32'h8000_0000, 32'h8000_0000, 32'h8000_0000);   // -0 + -0
    run(32'h0000_0000, 32'h4120_0000, 32'h4120_0000);   // 0 + 10
    run(32'h7F7F_FFFF, 32'h7F7F_FFFF, 32'h7F80_0000);   // overflow
    // random, wide range
    for (int i = 0; i < 4000; i++) check_rand(rnd_f(2, 252), rnd_f(2, 252));
    // random, close exponents (alignment and rounding)
    for (int i = 0; i < 4000; i++) begin
      x = rnd_f(100, 140);
      y = rnd_f(int'(x[30:23]) - 3 < 1 ? 1 : int'(x[30:23]) - 3, int'(x[30:23]) + 3);
      check_rand(x, y);
    end
    // near cancellation
    for (int i = 0; i < 4000; i++) begin
      x = rnd_f(60, 190);
      y = {~x[31], x[30:23], x[22:0] ^ 23'($urandom_range(255))};
      check_rand(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
