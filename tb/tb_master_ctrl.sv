// Self-checking testbench of master_ctrl. A behavioural ADC answers each
// start with new random samples after a few cycles, and a stand-in for the
// convolution units reports results 3 cycles after the last tap. For each
// sampling instant the testbench checks: one ADC start per trigger, the
// buffer write with the ADC data, a read of every age 0..DEPTH-1 in order,
// the tap word one cycle later with matching index and first/last flags,
// `done` exactly DEPTH + 5 cycles after the ADC reports, and `overrun` for
// a trigger that arrives while busy.
module tb_master_ctrl;
  import flutter_pkg::*;

  localparam int DEPTH   = 512;
  localparam int ADC_LAT = 7;

  logic                       clk = 1'b0;
  logic                       rst_n = 1'b0;
  logic                       trig = 1'b0;
  logic                       adc_start, adc_done = 1'b0;
  logic [1:0][15:0]           adc_data = '0;
  logic                       buf_wr;
  logic [1:0][15:0]           buf_data;
  logic                       rd_en;
  logic [$clog2(DEPTH)-1:0]   rd_age;
  tap_ctl_t                   tap;
  logic                       units_valid = 1'b0;
  logic                       done, busy, overrun;
  int                         checks = 0, failures = 0;

  master_ctrl #(.N_IN(2), .DEPTH(DEPTH), .X_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural ADC
  int adc_starts = 0;
  always @(posedge clk) begin
    if (adc_start && rst_n) begin
      adc_starts++;
      fork begin
        repeat (ADC_LAT - 1) @(posedge clk);
        adc_data <= {16'($urandom), 16'($urandom)};
        adc_done <= 1'b1;
        @(posedge clk);
        adc_done <= 1'b0;
      end join_none
    end
  end

  // stand-in for the units: valid 3 cycles after the last tap
  logic [2:0] lpipe = '0;
  always @(posedge clk) begin
    lpipe       <= {lpipe[1:0], tap.valid & tap.last};
    units_valid <= lpipe[1];
  end

  // monitor: buffer write, read sequence, tap alignment
  int      next_age, cyc, wr_cyc, done_cyc, writes, dones, overruns;
  logic    prev_rd;
  logic [$clog2(DEPTH)-1:0] prev_age;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (buf_wr) begin
        writes++; wr_cyc = cyc; next_age = 0;
        checks++;
        if (buf_data !== adc_data || !adc_done) begin failures++; $display("FAIL buffer write data"); end
      end
      if (rd_en) begin
        checks++;
        if (int'(rd_age) != next_age) begin failures++; $display("FAIL age %0d expected %0d", rd_age, next_age); end
        next_age++;
      end
      checks++;
      if (tap.valid !== prev_rd ||
          (prev_rd && (tap.idx != 16'(prev_age) || tap.first != (prev_age == 0) ||
                       tap.last != (prev_age == DEPTH - 1)))) begin
        failures++; $display("FAIL tap word at cycle %0d", cyc);
      end
      if (done) begin
        dones++;
        checks++;
        if (cyc - wr_cyc != DEPTH + 5) begin
          failures++; $display("FAIL done %0d cycles after the samples, expected %0d", cyc - wr_cyc, DEPTH + 5);
        end
        if (next_age != DEPTH) begin failures++; $display("FAIL sweep covered %0d ages", next_age); end
      end
      if (overrun) overruns++;
    end
    prev_rd  <= rd_en;
    prev_age <= rd_age;
  end

  initial begin
    cyc = 0; writes = 0; dones = 0; overruns = 0; next_age = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 5; s++) begin
      @(negedge clk);
      trig = 1'b1;
      @(negedge clk);
      trig = 1'b0;
      if (s == 2) begin
        repeat (100) @(negedge clk);
        trig = 1'b1;                 // during the sweep: dropped, overrun
        @(negedge clk);
        trig = 1'b0;
      end
      wait (done);
      repeat (3) @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL busy after done"); end
    end
    checks += 3;
    if (adc_starts != 5) begin failures++; $display("FAIL %0d ADC starts", adc_starts); end
    if (dones != 5 || writes != 5) begin failures++; $display("FAIL %0d windows, %0d writes", dones, writes); end
    if (overruns != 1) begin failures++; $display("FAIL %0d overruns", overruns); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
