// Self-checking testbench of the whole wavelet accelerator, driven the way
// the processor drives it, with the clock scaled to CLK_HZ = 110 kHz so
// that a 200 Hz sampling period is 550 cycles.
//
// A behavioural ADC returns two test signals (sums of sinusoids near the
// mode frequencies plus noise). The testbench loads six complex Morlet
// wavelets (5.2, 7.4 and 12.5 Hz at 200 Hz sampling) with different
// lengths and gains, enables sampling with interrupt and DMA request, and
// on every interrupt reads the 18 result words and compares them with a
// software model of the window convolution and reconstruction. It runs
// past 512 samples so the circular buffers wrap, checks the interval from
// the ADC's answer to the interrupt, and finally slows the ADC down so that
// triggers overrun the accelerator and checks the overrun status bit.
module tb_wavelet_accel;
  import flutter_pkg::*;

  localparam int CLK_HZ  = 110_000;
  localparam int N_WIN   = 540;
  localparam int HALF    = WAVE_PTS / 2;

  logic                          clk = 1'b0;
  logic                          rst_n = 1'b0;
  logic [AV_ADDR_W-1:0]          av_address = '0;
  logic                          av_read = 1'b0, av_write = 1'b0;
  logic [31:0]                   av_writedata = '0, av_readdata;
  logic                          adc_start, adc_done = 1'b0;
  logic [1:0][15:0]              adc_data = '0;
  logic                          dma_req, irq;
  int                            checks = 0, failures = 0;

  wavelet_accel #(.CLK_HZ(CLK_HZ)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference
  logic signed [15:0] wv   [N_CHANNELS][WAVE_PTS];
  int                 lens [N_CHANNELS] = '{512, 300, 128, 512, 200, 64};
  logic signed [15:0] gains[N_CHANNELS];
  logic signed [15:0] hist [N_INPUTS][$];       // [0] newest
  int                 cyc = 0, adc_done_cyc = 0, adc_lat = 20, n_smp = 0;

  always @(posedge clk) cyc++;

  // behavioural ADC
  always @(posedge clk) begin
    if (adc_start && rst_n) begin
      fork begin
        logic [1:0][15:0] d;
        real t;
        repeat (adc_lat - 1) @(posedge clk);
        t = real'(n_smp) / 200.0;
        d[0] = 16'($rtoi(6000.0 * $sin(2.0 * 3.14159265 * 5.2 * t) +
                         4000.0 * $sin(2.0 * 3.14159265 * 12.5 * t)) + int'($urandom_range(400)) - 200);
        d[1] = 16'($rtoi(9000.0 * $sin(2.0 * 3.14159265 * 7.4 * t + 0.3)) + int'($urandom_range(400)) - 200);
        n_smp++;
        adc_data <= d;
        adc_done <= 1'b1;
        for (int i = 0; i < N_INPUTS; i++) begin
          hist[i].push_front(d[i]);
          if (hist[i].size() > WINDOW) void'(hist[i].pop_back());
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
    int in_i = c / N_MODES;
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

  // ------------------------------------------------------------ bus master
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

  initial begin
    real freqs [N_MODES] = '{5.2, 7.4, 12.5};
    logic [31:0] e_re [N_CHANNELS], e_im [N_CHANNELS], e_rec [N_CHANNELS];
    logic [31:0] d;
    int wins = 0, overruns_seen = 0;
    // Morlet wavelets centred in their length, sampled at 200 Hz
    for (int c = 0; c < N_CHANNELS; c++) begin
      real f, sig, env, ph;
      f = freqs[c % N_MODES];
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
    for (int c = 0; c < N_CHANNELS; c++) begin
      for (int p = 0; p < WAVE_PTS; p++) bus_write(32'h2000 + (c << 10) + p, 32'(wv[c][p]));
      bus_write(16 + c, 32'(lens[c]));
      bus_write(24 + c, 32'(gains[c]));
    end
    bus_write(2, 200);
    bus_write(0, 32'h7);                       // sample, interrupt, DMA
    while (wins < N_WIN) begin
      @(posedge clk);
      if (irq) begin
        wins++;
        checks += 2;
        if (!dma_req) begin failures++; $display("FAIL no DMA request"); end
        if (cyc - adc_done_cyc != WINDOW + 6) begin
          failures++; $display("FAIL interrupt %0d cycles after ADC", cyc - adc_done_cyc);
        end
        for (int c = 0; c < N_CHANNELS; c++) expected(c, e_re[c], e_im[c], e_rec[c]);
        for (int c = 0; c < N_CHANNELS; c++) begin
          bus_read(64 + 4 * c, d); checks++;
          if (d !== e_re[c])  begin failures++; if (failures < 10) $display("FAIL win %0d ch %0d re %0d exp %0d", wins, c, $signed(d), $signed(e_re[c])); end
          bus_read(65 + 4 * c, d); checks++;
          if (d !== e_im[c])  begin failures++; if (failures < 10) $display("FAIL win %0d ch %0d im", wins, c); end
          bus_read(66 + 4 * c, d); checks++;
          if (d !== e_rec[c]) begin failures++; if (failures < 10) $display("FAIL win %0d ch %0d rec", wins, c); end
        end
        bus_write(1, 32'h1);
      end
    end
    bus_read(3, d);
    checks++;
    if (d != 32'(N_WIN)) begin failures++; $display("FAIL window count %0d", d); end
    // slow ADC: conversions plus sweep exceed the sampling period
    adc_lat = 100;
    repeat (20 * 550) @(posedge clk);
    bus_read(1, d);
    checks++;
    if (!d[1]) begin failures++; $display("FAIL no overrun reported"); end
    else overruns_seen++;
    $display("windows %0d, overrun seen %0d", wins, overruns_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
