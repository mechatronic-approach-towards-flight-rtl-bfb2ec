// Body shared by the two end-to-end testbenches of flutterometer. The
// including module defines CLK_HZ (the clock the top is built for, and the
// one the processor model assumes), N_WIN (windows to run), RATE (sampling
// rate in Hz), CHECK_OVERRUN (run the overrun phase) and instantiates the
// top as `dut`.
//
// The testbench plays the processor and the board around the FPGA:
// * an ADC model returns two accelerometer-like signals sampled at RATE:
//   vertical-tail signal = 5.2 Hz + 12.5 Hz modes, wing signal = 7.4 Hz
//   mode, plus noise; from 40 % to 60 % of the run the 5.2 Hz mode grows
//   (negative damping, the onset of flutter), after that it decays again;
// * the processor model loads six complex Morlet wavelets (5.2, 7.4, 12.5
//   Hz) of different lengths, enables sampling with DMA request, and on
//   each request reads the 18 result words, checks them against its own
//   model of the window convolution, then uses the floating-point custom
//   instructions to compute the amplitude sqrt(re^2 + im^2) of channel 0
//   and its relative change per window, checking every custom-instruction
//   result against a double-precision reference, and writes a damping
//   figure to the display and a flutter margin to the LED bar with an
//   alarm threshold, and sends the same figure as two bytes (low byte
//   first) over the serial output;
// * a receiver model decodes the serial line, sampling each bit in its
//   middle, and checks start bit, stop bit and the bytes' values and order.
// Every mechanism is counted and must occur: completed windows, DMA
// requests, circular-buffer wrap-around (only when N_WIN > 512), wavelet
// lengths shorter than the window, each of the four floating-point
// operations, a negative damping figure on the display, the live and the
// latched alarm with acknowledge, serial bytes received, and (when CHECK_OVERRUN) a sampling
// overrun.
  import flutter_pkg::*;
  import fp_ref_pkg::*;

  localparam int HALF = WAVE_PTS / 2;

  logic                          clk = 1'b0;
  logic                          rst_n = 1'b0;
  logic [AV_ADDR_W-1:0]          acc_address = '0;
  logic                          acc_read = 1'b0, acc_write = 1'b0;
  logic [31:0]                   acc_writedata = '0, acc_readdata;
  logic                          acc_dma_req, acc_irq;
  logic                          adc_start, adc_done = 1'b0;
  logic [1:0][15:0]              adc_data = '0;
  logic                          ci_clk_en = 1'b1, ci_start = 1'b0;
  logic [1:0]                    ci_n = '0;
  logic [31:0]                   ci_dataa = '0, ci_datab = '0, ci_result;
  logic                          ci_done;
  logic [1:0]                    pnl_address = '0;
  logic                          pnl_read = 1'b0, pnl_write = 1'b0;
  logic [31:0]                   pnl_writedata = '0, pnl_readdata;
  logic [7:0]                    seg;
  logic [3:0]                    dig_sel;
  logic [9:0]                    bar_red, bar_green;
  logic [1:0]                    alarm;
  logic [1:0]                    ser_address = '0;
  logic                          ser_read = 1'b0, ser_write = 1'b0;
  logic [31:0]                   ser_writedata = '0, ser_readdata;
  logic                          ser_txd;
  int                            checks = 0, failures = 0;

  always #10 clk = ~clk;

  // ------------------------------------------------------------ reference
  logic signed [15:0] wv   [N_CHANNELS][WAVE_PTS];
  int                 lens [N_CHANNELS] = '{512, 400, 256, 512, 300, 160};
  logic signed [15:0] gains[N_CHANNELS];
  logic signed [15:0] hist [N_INPUTS][$];
  int                 n_smp = 0, adc_lat = 25;
  int                 cnt_win = 0, cnt_dma = 0, cnt_wrap = 0, cnt_short = 0, cnt_ci [4] = '{0, 0, 0, 0};
  int                 cnt_neg = 0, cnt_alarm = 0, cnt_latch = 0, cnt_over = 0, cnt_ser = 0;
  // serial bit time: the reset divisor, or 8 cycles where the clock is too
  // slow for 115200 baud
  localparam int      SER_DIV = (CLK_HZ / 115_200 < 8) ? 8 : CLK_HZ / 115_200;
  logic [7:0]         ser_sent [$];

  // serial receiver model
  initial begin
    @(posedge rst_n);
    forever begin
      logic [7:0] b;
      @(posedge clk);
      if (ser_txd == 1'b0) begin
        repeat (SER_DIV / 2) @(posedge clk);
        check(ser_txd == 1'b0, "serial start bit");
        for (int i = 0; i < 8; i++) begin
          repeat (SER_DIV) @(posedge clk);
          b[i] = ser_txd;
        end
        repeat (SER_DIV) @(posedge clk);
        check(ser_txd == 1'b1, "serial stop bit");
        check(ser_sent.size() > 0 && b == ser_sent[0], $sformatf("serial byte %h", b));
        if (ser_sent.size() > 0) void'(ser_sent.pop_front());
        cnt_ser++;
      end
    end
  end

  always @(posedge clk) begin
    if (adc_start && rst_n) begin
      fork begin
        logic [1:0][15:0] d;
        real t, grow;
        repeat (adc_lat - 1) @(posedge clk);
        t = real'(n_smp) / real'(RATE);
        if (n_smp < 2 * N_WIN / 5)      grow = 1.0;
        else if (n_smp < 3 * N_WIN / 5) grow = $exp(0.9 * real'(n_smp - 2 * N_WIN / 5) / real'(N_WIN / 5));
        else grow = $exp(0.9 - 1.35 * real'(n_smp - 3 * N_WIN / 5) / real'(2 * N_WIN / 5));
        d[0] = 16'($rtoi(5000.0 * grow * $sin(2.0 * 3.14159265 * 5.2 * t) +
                         3000.0 * $sin(2.0 * 3.14159265 * 12.5 * t)) + int'($urandom_range(300)) - 150);
        d[1] = 16'($rtoi(8000.0 * $sin(2.0 * 3.14159265 * 7.4 * t + 0.3)) + int'($urandom_range(300)) - 150);
        n_smp++;
        adc_data <= d;
        adc_done <= 1'b1;
        for (int i = 0; i < N_INPUTS; i++) begin
          hist[i].push_front(d[i]);
          if (hist[i].size() > WINDOW) begin
            void'(hist[i].pop_back());
            if (i == 0) cnt_wrap++;
          end
        end
        @(posedge clk);
        adc_done <= 1'b0;
      end join_none
    end
  end

  initial begin
    repeat (N_WIN * (CLK_HZ / RATE + 2000) + 400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------ bus and CI
  task automatic acc_wr(input int a, input logic [31:0] d);
    @(negedge clk);
    acc_address = AV_ADDR_W'(a); acc_writedata = d; acc_write = 1'b1;
    @(negedge clk);
    acc_write = 1'b0;
  endtask

  task automatic acc_rd(input int a, output logic [31:0] d);
    @(negedge clk);
    acc_address = AV_ADDR_W'(a); acc_read = 1'b1;
    @(negedge clk);
    acc_read = 1'b0;
    d = acc_readdata;
  endtask

  task automatic pnl_wr(input int a, input logic [31:0] d);
    @(negedge clk);
    pnl_address = 2'(a); pnl_writedata = d; pnl_write = 1'b1;
    @(negedge clk);
    pnl_write = 1'b0;
  endtask

  task automatic ser_wr(input int a, input logic [31:0] d);
    if (a == 0) ser_sent.push_back(d[7:0]);
    @(negedge clk);
    ser_address = 2'(a); ser_writedata = d; ser_write = 1'b1;
    @(negedge clk);
    ser_write = 1'b0;
  endtask

  // custom instruction with result check against the reference
  task automatic ci(input logic [1:0] op, input logic [31:0] x, input logic [31:0] y,
                    output logic [31:0] r);
    logic [31:0] e;
    int          n;
    unique case (op)
      2'd0:    e = r2f(f2r(x) + f2r(y));
      2'd1:    e = r2f(f2r(x) * f2r(y));
      2'd2:    e = r2f(1.0 / f2r(x));
      default: e = r2f($sqrt(f2r(x)));
    endcase
    @(negedge clk);
    ci_n = op; ci_dataa = x; ci_datab = y; ci_start = 1'b1;
    @(negedge clk);
    ci_start = 1'b0;
    n = 0;
    while (!ci_done && n < 100) begin
      @(negedge clk);
      n++;
    end
    r = ci_result;
    cnt_ci[op]++;
    check(ci_done && r == e, $sformatf("custom instruction %0d (%h, %h): %h expected %h", op, x, y, r, e));
  endtask

  // ------------------------------------------------------------ processor
  initial begin
    real freqs [N_MODES] = '{5.2, 7.4, 12.5};
    logic [31:0] e_re [N_CHANNELS], e_im [N_CHANNELS], e_rec [N_CHANNELS];
    logic [31:0] d, re2, im2, pw, amp, amp_prev, inv, diff, rel, neg_prev;
    int          shown;
    amp_prev = 32'h0;
    for (int c = 0; c < N_CHANNELS; c++) begin
      real f, sig, env, ph;
      f = freqs[c % N_MODES];
      sig = real'(lens[c]) / 6.0;
      if (lens[c] < WINDOW) cnt_short++;
      for (int k = 0; k < HALF; k++) begin
        env = $exp(-((real'(k) - real'(lens[c]) / 2.0) ** 2) / (2.0 * sig * sig));
        ph  = 2.0 * 3.14159265 * f * real'(k) / real'(RATE);
        wv[c][k]        = 16'($rtoi(32000.0 * env * $cos(ph)));
        wv[c][k + HALF] = 16'($rtoi(-32000.0 * env * $sin(ph)));
      end
      gains[c] = 16'(8192 + 1000 * c);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < N_CHANNELS; c++) begin
      for (int p = 0; p < WAVE_PTS; p++) acc_wr(32'h2000 + (c << 10) + p, 32'(wv[c][p]));
      acc_wr(16 + c, 32'(lens[c]));
      acc_wr(24 + c, 32'(gains[c]));
    end
    pnl_wr(2, {23'b0, 1'b1, 8'd4});              // alarm below 4 LEDs of margin
    ser_wr(2, 32'(SER_DIV));
    acc_wr(2, RATE);
    acc_wr(0, 32'h5);                            // sampling and DMA request
    while (cnt_win < N_WIN) begin
      @(posedge clk);
      if (acc_dma_req) begin
        cnt_dma++;
        cnt_win++;
        for (int c = 0; c < N_CHANNELS; c++) expected(c, e_re[c], e_im[c], e_rec[c]);
        for (int c = 0; c < N_CHANNELS; c++) begin
          acc_rd(64 + 4 * c, d);
          check(d == e_re[c], $sformatf("window %0d channel %0d re %0d expected %0d", cnt_win, c, $signed(d), $signed(e_re[c])));
          acc_rd(65 + 4 * c, d);
          check(d == e_im[c], $sformatf("window %0d channel %0d im", cnt_win, c));
          acc_rd(66 + 4 * c, d);
          check(d == e_rec[c], $sformatf("window %0d channel %0d rec", cnt_win, c));
        end
        acc_wr(1, 32'h1);                        // acknowledge: clears the request
        // amplitude of the 5.2 Hz mode of the tail signal and its change
        ci(2'd1, r2f(real'($signed(e_re[0]))), r2f(real'($signed(e_re[0]))), re2);
        ci(2'd1, r2f(real'($signed(e_im[0]))), r2f(real'($signed(e_im[0]))), im2);
        ci(2'd0, re2, im2, pw);
        ci(2'd3, pw, 32'h0, amp);
        if (amp[30:23] != 0 && amp_prev[30:23] != 0) begin
          // relative decay per window: (prev - now) / now, positive = damped
          ci(2'd2, amp, 32'h0, inv);
          ci(2'd0, amp_prev, {~amp[31], amp[30:0]}, diff);
          ci(2'd1, diff, inv, rel);
          shown = $rtoi(f2r(rel) * 10000.0);
          if (shown > 9999) shown = 9999;
          if (shown < -999) shown = -999;
          if (cnt_win % 16 == 0 || cnt_win == N_WIN) begin
            pnl_wr(0, {13'b0, 1'b1, 2'd3, 16'(shown)});
            ser_wr(0, {24'b0, 8'(shown)});
            ser_wr(0, {24'b0, 8'(shown >> 8)});
            if (shown < 0) cnt_neg++;
            // margin: damped -> full bar, undamped -> short bar
            pnl_wr(1, (shown > 0) ? 32'd9 : 32'd2);
            @(negedge clk);
            if (alarm[0]) cnt_alarm++;
            if (alarm[1] && !alarm[0]) cnt_latch++;
            check(alarm[0] == (shown <= 0), "alarm follows the margin");
            if (alarm[1] && !alarm[0]) pnl_wr(3, 32'h1);   // acknowledged after recovery
          end
        end
        amp_prev = amp;
      end
    end
    if (CHECK_OVERRUN) begin
      adc_lat = CLK_HZ / RATE;                   // ADC slower than the sampling period
      repeat (6 * (CLK_HZ / RATE)) @(posedge clk);
      acc_rd(1, d);
      if (d[1]) cnt_over++;
      check(d[1], "overrun reported");
    end
    // the display shows the last damping figure on its left digit
    acc_rd(3, d);
    check(d >= 32'(N_WIN), "window counter");
    repeat (25 * SER_DIV) @(posedge clk);         // let the last bytes out
    $display("windows %0d dma %0d wraps %0d short-wavelets %0d ci add %0d mul %0d recip %0d sqrt %0d negative %0d alarms %0d latched %0d overruns %0d serial-bytes %0d",
             cnt_win, cnt_dma, cnt_wrap, cnt_short, cnt_ci[0], cnt_ci[1], cnt_ci[2], cnt_ci[3],
             cnt_neg, cnt_alarm, cnt_latch, cnt_over, cnt_ser);
    check(cnt_ser > 0 && ser_sent.size() == 0, "serial bytes received");
    check(cnt_win == N_WIN && cnt_dma == N_WIN, "windows and DMA requests");
    check(cnt_short > 0, "wavelets shorter than the window");
    for (int k = 0; k < 4; k++) check(cnt_ci[k] > 0, $sformatf("custom instruction %0d used", k));
    if (N_WIN > WINDOW) check(cnt_wrap > 0, "circular buffer wrapped");
    if (N_WIN >= 64) begin
      check(cnt_neg > 0, "negative damping displayed");
      check(cnt_alarm > 0, "alarm raised");
      check(cnt_latch > 0, "latched alarm after recovery");
    end
    if (CHECK_OVERRUN) check(cnt_over > 0, "overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
