// Self-checking testbench of accel_regs: reset values, read-back of the
// configuration registers and their outputs, decoding of wavelet writes
// (channel, point, data, no register side effect), the done and overrun
// status bits with write-1-to-clear, the window counter, the DMA request
// and interrupt gating, and the read-only result and sample words. Checks
// the one-cycle read latency.
module tb_accel_regs;
  import flutter_pkg::*;

  localparam int N_CH = 6, N_IN = 2;

  logic                        clk = 1'b0;
  logic                        rst_n = 1'b0;
  logic [13:0]                 address = '0;
  logic                        read = 1'b0, write = 1'b0;
  logic [31:0]                 writedata = '0, readdata;
  logic                        smp_enable;
  logic [7:0]                  rate_hz;
  logic [N_CH-1:0][9:0]        len;
  logic [N_CH-1:0][15:0]       gain;
  logic                        wv_we;
  logic [2:0]                  wv_ch;
  logic [9:0]                  wv_addr;
  logic [15:0]                 wv_data;
  logic                        done = 1'b0, overrun = 1'b0, busy = 1'b0;
  chan_result_t [N_CH-1:0]     results;
  logic [N_IN-1:0][15:0]       samples;
  logic                        dma_req, irq;
  int                          checks = 0, failures = 0;

  accel_regs #(.N_CH(N_CH), .N_IN(N_IN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk);
    address = 14'(a); writedata = d; write = 1'b1;
    @(negedge clk);
    write = 1'b0;
  endtask

  task automatic rd_check(input int a, input logic [31:0] expect_d, input string what);
    @(negedge clk);
    address = 14'(a); read = 1'b1;
    @(negedge clk);
    read = 1'b0;
    checks++;
    if (readdata !== expect_d) begin
      failures++; $display("FAIL %s: read %h expected %h", what, readdata, expect_d);
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse_done();
    @(negedge clk); done = 1'b1;
    @(negedge clk); done = 1'b0;
  endtask

  initial begin
    for (int c = 0; c < N_CH; c++) results[c] = {32'($urandom), 32'($urandom), 32'($urandom)};
    samples = {16'h8001, 16'h1234};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // reset values
    rd_check(0, 32'd0, "CTRL reset");
    rd_check(2, 32'd100, "RATE reset");
    rd_check(16, 32'd512, "LEN reset");
    check(!smp_enable && rate_hz == 8'd100 && !dma_req && !irq, "reset outputs");
    // configuration
    wr(2, 32'd150);
    rd_check(2, 32'd150, "RATE");
    check(rate_hz == 8'd150, "rate output");
    for (int c = 0; c < N_CH; c++) begin
      wr(16 + c, 32'(100 + c));
      wr(24 + c, 32'(16'h4000 + c));
    end
    for (int c = 0; c < N_CH; c++) begin
      rd_check(16 + c, 32'(100 + c), "LEN");
      rd_check(24 + c, 32'(16'h4000 + c), "GAIN");
      check(len[c] == 10'(100 + c) && gain[c] == 16'(16'h4000 + c), "len/gain outputs");
    end
    wr(0, 32'h1);
    check(smp_enable, "enable");
    // wavelet write decode
    @(negedge clk);
    address = 14'h2000 | 14'(5 << 10) | 14'd777; writedata = 32'hABCD_5A5A; write = 1'b1;
    #1;
    check(wv_we && wv_ch == 3'd5 && wv_addr == 10'd777 && wv_data == 16'h5A5A, "wavelet write decode");
    @(negedge clk);
    write = 1'b0;
    #1;
    check(!wv_we, "no wavelet write without write strobe");
    wr(16, 32'd100);
    @(negedge clk);
    address = 14'd16; write = 1'b0;
    check(!wv_we, "register write is not a wavelet write");
    rd_check(2, 32'd150, "RATE untouched by wavelet write");
    // done without DMA enable: status only
    pulse_done();
    rd_check(1, 32'h1, "STATUS done");
    rd_check(3, 32'd1, "COUNT");
    check(!dma_req && !irq, "no request while disabled");
    wr(0, 32'h7);
    check(dma_req && irq, "request when enabled");
    wr(1, 32'h1);
    check(!dma_req && !irq, "request cleared with status");
    rd_check(1, 32'h0, "STATUS cleared");
    // done and clear in the same cycle: done wins
    @(negedge clk);
    address = 14'd1; writedata = 32'h1; write = 1'b1; done = 1'b1;
    @(negedge clk);
    write = 1'b0; done = 1'b0;
    check(dma_req, "done wins over clear");
    // overrun and busy
    @(negedge clk); overrun = 1'b1;
    @(negedge clk); overrun = 1'b0; busy = 1'b1;
    rd_check(1, 32'h7, "STATUS overrun+busy+done");
    wr(1, 32'h2);
    rd_check(1, 32'h5, "STATUS overrun cleared");
    busy = 1'b0;
    rd_check(3, 32'd2, "COUNT 2");
    // results and samples
    for (int c = 0; c < N_CH; c++) begin
      rd_check(64 + 4 * c, results[c].re, "result re");
      rd_check(65 + 4 * c, results[c].im, "result im");
      rd_check(66 + 4 * c, results[c].rec, "result rec");
    end
    rd_check(128, 32'h0000_1234, "sample 0");
    rd_check(129, 32'hFFFF_8001, "sample 1 sign-extended");
    rd_check(200, 32'h0, "unmapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
