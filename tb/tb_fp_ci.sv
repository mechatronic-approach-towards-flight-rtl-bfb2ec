// Self-checking testbench of fp_ci: issues add, multiply, reciprocal and
// square root through the custom-instruction handshake in random order and
// checks each result against the double-precision reference and each
// latency (1, 1, 28 and 27 cycles). Also checks that clk_en low blocks a
// start.
module tb_fp_ci;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic        reset = 1'b1;
  logic        clk_en = 1'b1;
  logic        start = 1'b0;
  logic [1:0]  n = '0;
  logic [31:0] dataa = '0, datab = '0, result;
  logic        done;
  int          checks = 0, failures = 0;
  int          per_op [4] = '{0, 0, 0, 0};

  fp_ci dut (.clk, .reset, .clk_en, .start, .n, .dataa, .datab, .result, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input logic [1:0] op, input logic [31:0] x, input logic [31:0] y);
    logic [31:0] exp_r;
    int          lat, cnt;
    unique case (op)
      2'd0: begin exp_r = r2f(f2r(x) + f2r(y)); lat = 1;  end
      2'd1: begin exp_r = r2f(f2r(x) * f2r(y)); lat = 1;  end
      2'd2: begin exp_r = r2f(1.0 / f2r(x));    lat = 28; end
      default: begin exp_r = r2f($sqrt(f2r(x))); lat = 27; end
    endcase
    @(negedge clk);
    n = op; dataa = x; datab = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cnt = 1;
    while (!done && cnt < 100) begin
      @(negedge clk);
      cnt++;
    end
    checks++;
    per_op[op]++;
    if (result !== exp_r || cnt != lat) begin
      failures++;
      if (failures < 10)
        $display("FAIL op %0d (%h, %h): got %h after %0d, expected %h after %0d",
                 op, x, y, result, cnt, exp_r, lat);
    end
  endtask

  initial begin
    logic [31:0] x, y;
    logic [1:0]  op;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      op = 2'($urandom);
      x  = rnd_f(70, 180);
      y  = rnd_f(70, 180);
      if (op == 2'd3) x[31] = 1'b0;
      issue(op, x, y);
    end
    // clk_en low: start is ignored, no done follows
    @(negedge clk);
    clk_en = 1'b0; n = 2'd1; dataa = 32'h4000_0000; datab = 32'h4000_0000; start = 1'b1;
    @(negedge clk);
    start = 1'b0; clk_en = 1'b1;
    repeat (3) @(negedge clk);
    checks++;
    if (done) begin
      failures++;
      $display("FAIL: start with clk_en low produced done");
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (per_op[k] == 0) begin
        failures++;
        $display("FAIL: operation %0d never issued", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
