// Self-checking testbench of fp_sqrt: perfect squares, special values and
// random positive operands with odd and even exponents, compared with the
// square root computed in double precision and rounded to binary32.
// Checks the latency of 27 cycles from start to done.
module tb_fp_sqrt;
  import fp_ref_pkg::*;

  localparam int LAT = 27;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] a = '0, result;
  logic        done, busy;
  int          checks = 0, failures = 0;

  fp_sqrt dut (.clk, .rst_n, .start, .a, .result, .done, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] x, input logic [31:0] exp_r);
    int n;
    @(negedge clk);
    a = x; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 1;
    while (!done && n < 100) begin
      @(negedge clk);
      n++;
    end
    checks++;
    if (result !== exp_r || n != LAT) begin
      failures++;
      if (failures < 10)
        $display("FAIL sqrt %h: got %h after %0d cycles, expected %h after %0d", x, result, n, exp_r, LAT);
    end
  endtask

  initial begin
    logic [31:0] x;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(32'h3F80_0000, 32'h3F80_0000);   // sqrt 1
    run(32'h4080_0000, 32'h4000_0000);   // sqrt 4
    run(32'h4110_0000, 32'h4040_0000);   // sqrt 9
    run(32'h4000_0000, 32'h3FB5_04F3);   // sqrt 2
    run(32'h0000_0000, 32'h0000_0000);   // +0
    run(32'h8000_0000, 32'h8000_0000);   // -0
    run(32'hBF80_0000, 32'h7FC0_0000);   // sqrt -1
    run(32'h7F80_0000, 32'h7F80_0000);   // +inf
    run(32'h7FC0_0000, 32'h7FC0_0000);   // NaN
    for (int i = 0; i < 3000; i++) begin
      x = rnd_f(1, 254);
      x[31] = 1'b0;
      run(x, r2f($sqrt(f2r(x))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
