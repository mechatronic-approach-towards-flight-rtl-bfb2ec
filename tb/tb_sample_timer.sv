// Self-checking testbench of sample_timer with a scaled clock (CLK_HZ =
// 2000 so that one simulated second is 2000 cycles): for several rates,
// including rates outside 10..200 Hz that must clamp, counts the triggers in
// one second, checks that the spacing of triggers varies by at most one
// cycle, that the first trigger follows ceil(CLK_HZ/rate) cycles after enable,
// and that no trigger occurs while disabled.
module tb_sample_timer;
  localparam int CLK_HZ = 2000;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       enable = 1'b0;
  logic [7:0] rate_hz = 8'd100;
  logic       trig;
  int         checks = 0, failures = 0;

  sample_timer #(.CLK_HZ(CLK_HZ)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_second(input int rate, input int expect_hz);
    int count, first, last, gap_min, gap_max;
    @(negedge clk);
    enable = 1'b0;
    rate_hz = 8'(rate);
    @(negedge clk);
    enable = 1'b1;
    count = 0; first = -1; last = -1; gap_min = 1 << 30; gap_max = 0;
    for (int c = 1; c <= CLK_HZ; c++) begin
      @(negedge clk);
      if (trig) begin
        if (first < 0) first = c;
        if (last >= 0) begin
          if (c - last < gap_min) gap_min = c - last;
          if (c - last > gap_max) gap_max = c - last;
        end
        last = c;
        count++;
      end
    end
    checks += 3;
    if (count != expect_hz) begin
      failures++; $display("FAIL rate %0d: %0d triggers, expected %0d", rate, count, expect_hz);
    end
    if (gap_max - gap_min > 1) begin
      failures++; $display("FAIL rate %0d: spacing %0d..%0d", rate, gap_min, gap_max);
    end
    if (first != (CLK_HZ + expect_hz - 1) / expect_hz) begin
      failures++; $display("FAIL rate %0d: first trigger at %0d", rate, first);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // disabled: no trigger
    repeat (500) begin
      @(negedge clk);
      checks++;
      if (trig) failures++;
    end
    one_second(100, 100);
    one_second(10, 10);
    one_second(200, 200);
    one_second(37, 37);
    one_second(133, 133);
    one_second(3, 10);       // clamped up
    one_second(250, 200);    // clamped down
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
