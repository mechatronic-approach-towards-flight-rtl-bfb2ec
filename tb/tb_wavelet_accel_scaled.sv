// Testbench of the wavelet accelerator in a scaled configuration: four
// input signals with two modes each (eight channels, the most the register
// map holds), a 256-sample window and 512-point wavelet tables. The clock is
// scaled to CLK_HZ = 110 kHz so that a 200 Hz sampling period is 550 cycles.
//
// It checks that the accelerator scales as intended: the channels are
// mapped to inputs as c / N_MOD, the wavelet tables are addressed with the
// smaller stride, the length registers reset to the window size, every
// result word matches a software model of the window convolution and
// reconstruction, and the interval from the ADC's answer to the interrupt
// is DEPTH + 6 cycles whatever the number of channels. It runs past 256
// samples so the circular buffers wrap.
module tb_wavelet_accel_scaled;
  import flutter_pkg::*;

  localparam int CLK_HZ = 110_000;
  localparam int NI     = 4;
  localparam int NM     = 2;
  localparam int NC     = NI * NM;
  localparam int DEPTH  = 256;
  localparam int PTS    = 512;
  localparam int HALF   = PTS / 2;
  localparam int N_WIN  = 300;

  logic                          clk = 1'b0;
  logic                          rst_n = 1'b0;
  logic [AV_ADDR_W-1:0]          av_address = '0;
  logic                          av_read = 1'b0, av_write = 1'b0;
  logic [31:0]                   av_writedata = '0, av_readdata;
  logic                          adc_start, adc_done = 1'b0;
  logic [NI-1:0][15:0]           adc_data = '0;
  logic                          dma_req, irq;
  int                            checks = 0, failures = 0;

  wavelet_accel #(.N_IN(NI), .N_MOD(NM), .DEPTH(DEPTH), .PTS(PTS), .CLK_HZ(CLK_HZ)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [15:0] wv   [NC][PTS];
  int                 lens [NC] = '{256, 100, 256, 33, 180, 256, 7, 256};
  logic signed [15:0] gains[NC];
  logic signed [15:0] hist [NI][$];            // [0] newest
  int                 cyc = 0, adc_done_cyc = 0, n_smp = 0;

  always @(posedge clk) cyc++;

  // behavioural ADC: input i carries a tone at 4 + 3i Hz plus noise
  always @(posedge clk) begin
    if (adc_start && rst_n) begin
      fork begin
        logic [NI-1:0][15:0] d;
        real t;
        repeat (19) @(posedge clk);
        t = real'(n_smp) / 200.0;
        for (int i = 0; i < NI; i++)
          d[i] = 16'($rtoi(8000.0 * $sin(2.0 * 3.14159265 * (4.0 + 3.0 * i) * t + i))
                       + int'($urandom_range(400)) - 200);
        n_smp++;
        adc_data <= d;
        adc_done <= 1'b1;
        for (int i = 0; i < NI; i++) begin
          hist[i].push_front(d[i]);
          if (hist[i].size() > DEPTH) void'(hist[i].pop_back());
        end
        adc_done_cyc = cyc + 1;
        @(posedge clk);
        adc_done <= 1'b0;
      end join_none
    end
  end

  function automatic void expected(input int c, output logic [31:0] re, output logic [31:0] im,
                                   output logic [31:0] rec);
    longint sr = 0, si = 0, er;
    int in_i = c / NM;
    for (int k = 0; k < lens[c]; k++) begin
      longint x = (k < hist[in_i].size()) ? longint'(hist[in_i][k]) : 0;
      sr += x * longint'(wv[c][k]);
      si += x * longint'(wv[c][k + HALF]);
    end
    er  = sr >>> 15;
    re  = 32'(er);
    im  = 32'(si >>> 15);
    rec = 32'((er * longint'(gains[c])) >>> 15);
  endfunction

  task automatic bus_write(input int a, input logic [31:0] d);
    @(negedge clk);
    av_address = AV_ADDR_W'(a); av_writedata = d; av_write = 1'b1;
    @(negedge clk);
    av_write = 1'b0;
  endtask

  task automatic bus_read(input int a, output logic [31:0] d);
    @(negedge clk);
    av_address = AV_ADDR_W'(a); av_read = 1'b1;
    @(negedge clk);
    av_read = 1'b0;
    d = av_readdata;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] e_re [NC], e_im [NC], e_rec [NC];
    logic [31:0] d;
    int wins = 0;
    for (int c = 0; c < NC; c++) begin
      real f, sig, env, ph;
      f = 4.0 + 3.0 * (c / NM) + 0.5 * (c % NM);
      sig = real'(lens[c]) / 6.0;
      for (int k = 0; k < HALF; k++) begin
        env = $exp(-((real'(k) - real'(lens[c]) / 2.0) ** 2) / (2.0 * sig * sig));
        ph  = 2.0 * 3.14159265 * f * real'(k) / 200.0;
        wv[c][k]        = 16'($rtoi(32000.0 * env * $cos(ph)));
        wv[c][k + HALF] = 16'($rtoi(-32000.0 * env * $sin(ph)));
      end
      gains[c] = 16'(int'($urandom_range(32767)) - 16384);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NC; c++) begin
      bus_read(16 + c, d);
      check(d == 32'(DEPTH), $sformatf("length %0d after reset: %0d", c, d));
      for (int p = 0; p < PTS; p++) bus_write(32'h2000 + c * PTS + p, 32'(wv[c][p]));
      bus_write(16 + c, 32'(lens[c]));
      bus_write(24 + c, 32'(gains[c]));
    end
    bus_write(2, 200);
    bus_write(0, 32'h7);
    while (wins < N_WIN) begin
      @(posedge clk);
      if (irq) begin
        wins++;
        check(dma_req, "DMA request with the interrupt");
        check(cyc - adc_done_cyc == DEPTH + 6,
              $sformatf("interrupt %0d cycles after the ADC", cyc - adc_done_cyc));
        for (int c = 0; c < NC; c++) expected(c, e_re[c], e_im[c], e_rec[c]);
        for (int c = 0; c < NC; c++) begin
          bus_read(64 + 4 * c, d);
          check(d == e_re[c], $sformatf("window %0d channel %0d re", wins, c));
          bus_read(65 + 4 * c, d);
          check(d == e_im[c], $sformatf("window %0d channel %0d im", wins, c));
          bus_read(66 + 4 * c, d);
          check(d == e_rec[c], $sformatf("window %0d channel %0d rec", wins, c));
        end
        for (int i = 0; i < NI; i++) begin
          bus_read(128 + i, d);
          check(d[15:0] == hist[i][0], $sformatf("newest sample of input %0d", i));
        end
        bus_write(1, 32'h1);
      end
    end
    bus_read(3, d);
    check(d == 32'(N_WIN), "window count");
    $display("windows %0d", wins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
