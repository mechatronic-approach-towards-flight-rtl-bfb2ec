// Workload testbench: the laboratory and flight test cases of the flutter
// monitor, run through the whole top (flutterometer) with the clock scaled
// to CLK_HZ = 100 kHz and 100 Hz sampling (1000 cycles per sample).
//
// Phase 1, laboratory: a triangle wave of 7.48 Hz and constant amplitude on
//   the first input, filtered by a 7.48 Hz wavelet (256 taps). Expected: the
//   mode frequency read from the rotation of the complex coefficient is
//   7.48 Hz and the damping ratio from the envelope is near zero.
// Phase 2, laboratory: a square wave of 5.76 Hz on the second input whose
//   amplitude first decays (damping ratio +0.02) and then grows (-0.02).
//   Expected: 5.76 Hz, a positive damping estimate while the amplitude
//   decays and a negative one while it grows, each within 25 % of 0.02.
// Phase 3, flight: two signals, each a sum of the 5.2, 7.46 and 12.5 Hz
//   modes with different amplitudes plus noise, filtered by the three
//   wavelets of 512 taps per signal. Expected: each of the six channels
//   finds its own mode frequency within 0.1 Hz.
// In all phases every result word read over the bus is also compared
// bit-exactly with a software model of the window convolution. The
// frequency and damping estimates stand in for the processor's RLS
// identification, which is software and not part of this design.
module tb_workloads;
  import flutter_pkg::*;

  localparam int CLK_HZ = 100_000;
  localparam int FS     = 100;
  localparam int HALF   = WAVE_PTS / 2;
  localparam real PI    = 3.14159265358979;

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

  flutterometer #(.CLK_HZ(CLK_HZ)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ stimulus
  int  phase = 0, n_smp = 0;
  real amp2 = 1.0;                 // phase 2 amplitude
  real zeta2 = 0.02;               // phase 2 damping ratio magnitude
  int  p2_decay_from = 300, p2_grow_from = 700;
  logic signed [15:0] hist [N_INPUTS][$];

  function automatic real tri_wave(input real t, input real f);
    real u;
    u = t * f - $floor(t * f);
    return (u < 0.5) ? 4.0 * u - 1.0 : 3.0 - 4.0 * u;
  endfunction

  always @(posedge clk) begin
    if (adc_start && rst_n) begin
      fork begin
        logic [1:0][15:0] d;
        real t, s0, s1;
        repeat (19) @(posedge clk);
        t = real'(n_smp) / real'(FS);
        s0 = 0.0; s1 = 0.0;
        if (phase == 1) s0 = 10000.0 * tri_wave(t, 7.48);
        if (phase == 2) begin
          if (n_smp >= p2_grow_from)       amp2 = amp2 * $exp( zeta2 * 2.0 * PI * 5.76 / real'(FS));
          else if (n_smp >= p2_decay_from) amp2 = amp2 * $exp(-zeta2 * 2.0 * PI * 5.76 / real'(FS));
          s1 = 12000.0 * amp2 * (($sin(2.0 * PI * 5.76 * t) >= 0.0) ? 1.0 : -1.0);
        end
        if (phase == 3) begin
          s0 = 4000.0 * $sin(2.0 * PI * 5.2 * t) + 3000.0 * $sin(2.0 * PI * 7.46 * t + 1.0)
             + 2500.0 * $sin(2.0 * PI * 12.5 * t + 2.0);
          s1 = 2000.0 * $sin(2.0 * PI * 5.2 * t + 0.5) + 5000.0 * $sin(2.0 * PI * 7.46 * t)
             + 1500.0 * $sin(2.0 * PI * 12.5 * t + 0.7);
          s0 += real'(int'($urandom_range(600)) - 300);
          s1 += real'(int'($urandom_range(600)) - 300);
        end
        d[0] = 16'($rtoi(s0));
        d[1] = 16'($rtoi(s1));
        n_smp++;
        adc_data <= d;
        adc_done <= 1'b1;
        for (int i = 0; i < N_INPUTS; i++) begin
          hist[i].push_front(d[i]);
          if (hist[i].size() > WINDOW) void'(hist[i].pop_back());
        end
        @(posedge clk);
        adc_done <= 1'b0;
      end join_none
    end
  end

  // ------------------------------------------------------------ processor
  logic signed [15:0] wv    [N_CHANNELS][WAVE_PTS];
  int                 lens  [N_CHANNELS];
  real                freqs [N_CHANNELS];
  real                c_re  [N_CHANNELS][$];
  real                c_im  [N_CHANNELS][$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

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

  function automatic logic [31:0] model(input int c, input bit imag);
    longint s = 0;
    int in_i = c / N_MODES;
    for (int k = 0; k < lens[c]; k++) begin
      longint x = (k < hist[in_i].size()) ? longint'(hist[in_i][k]) : 0;
      s += x * longint'(wv[c][k + (imag ? HALF : 0)]);
    end
    return 32'(s >>> 15);
  endfunction

  // reset, load Morlet wavelets, run n windows, keep the coefficients
  task automatic run_phase(input int ph, input int n_win);
    logic [31:0] e [N_CHANNELS][2];
    logic [31:0] d;
    int wins;
    @(negedge clk);
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    phase = ph; n_smp = 0; amp2 = 1.0;
    for (int i = 0; i < N_INPUTS; i++) hist[i].delete();
    for (int c = 0; c < N_CHANNELS; c++) begin
      real sig;
      c_re[c].delete(); c_im[c].delete();
      sig = real'(lens[c]) / 6.0;
      for (int k = 0; k < HALF; k++) begin
        real env, phs;
        env = (k < lens[c]) ? $exp(-((real'(k) - real'(lens[c]) / 2.0) ** 2) / (2.0 * sig * sig)) : 0.0;
        phs = 2.0 * PI * freqs[c] * real'(k) / real'(FS);
        wv[c][k]        = 16'($rtoi(32000.0 * env * $cos(phs)));
        wv[c][k + HALF] = 16'($rtoi(-32000.0 * env * $sin(phs)));
      end
      for (int p = 0; p < WAVE_PTS; p++) acc_wr(32'h2000 + (c << 10) + p, 32'(wv[c][p]));
      acc_wr(16 + c, 32'(lens[c]));
      acc_wr(24 + c, 32'h4000);
    end
    acc_wr(2, FS);
    acc_wr(0, 32'h3);                            // sampling and interrupt
    wins = 0;
    while (wins < n_win) begin
      @(posedge clk);
      if (acc_irq) begin
        wins++;
        for (int c = 0; c < N_CHANNELS; c++) begin
          e[c][0] = model(c, 1'b0);
          e[c][1] = model(c, 1'b1);
        end
        for (int c = 0; c < N_CHANNELS; c++) begin
          acc_rd(64 + 4 * c, d);
          check(d == e[c][0], $sformatf("phase %0d window %0d channel %0d re", ph, wins, c));
          c_re[c].push_back(real'($signed(d)));
          acc_rd(65 + 4 * c, d);
          check(d == e[c][1], $sformatf("phase %0d window %0d channel %0d im", ph, wins, c));
          c_im[c].push_back(real'($signed(d)));
        end
        acc_wr(1, 32'h1);
      end
    end
    acc_wr(0, 32'h0);
  endtask

  // mode frequency from the mean rotation of the coefficient over [a, b)
  function automatic real freq_est(input int c, input int a, input int b);
    real acc = 0.0;
    for (int n = a + 1; n < b; n++) begin
      real cr, ci;
      cr = c_re[c][n] * c_re[c][n-1] + c_im[c][n] * c_im[c][n-1];
      ci = c_im[c][n] * c_re[c][n-1] - c_re[c][n] * c_im[c][n-1];
      acc += $atan2(ci, cr);
    end
    acc = acc / real'(b - a - 1);
    return ((acc < 0.0) ? -acc : acc) * real'(FS) / (2.0 * PI);
  endfunction

  // damping ratio from the envelope decay between windows a and b
  function automatic real zeta_est(input int c, input int a, input int b, input real f);
    real aa, ab, sigma;
    aa = $sqrt(c_re[c][a] ** 2 + c_im[c][a] ** 2);
    ab = $sqrt(c_re[c][b] ** 2 + c_im[c][b] ** 2);
    sigma = -$ln(ab / aa) * real'(FS) / real'(b - a);
    return sigma / (2.0 * PI * f);
  endfunction

  initial begin
    real f, z;
    int  lab_ok = 0, flight_ok = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // phase 1: triangle wave, 7.48 Hz
    freqs = '{7.48, 5.2, 12.5, 7.48, 5.2, 12.5};
    lens  = '{256, 256, 256, 256, 256, 256};
    run_phase(1, 700);
    f = freq_est(0, 400, 700);
    z = zeta_est(0, 400, 699, 7.48);
    $display("lab triangle: frequency %.3f Hz, damping ratio %.4f", f, z);
    check(f > 7.43 && f < 7.53, "triangle frequency");
    check(z > -0.003 && z < 0.003, "triangle damping near zero");
    // phase 2: square wave, 5.76 Hz, decaying then growing
    freqs = '{5.76, 7.48, 12.5, 5.76, 7.48, 12.5};
    run_phase(2, 1100);
    f = freq_est(3, 300, 1100);
    $display("lab square: frequency %.3f Hz", f);
    check(f > 5.71 && f < 5.81, "square frequency");
    z = zeta_est(3, 600, 699, 5.76);
    $display("lab square, decaying amplitude: damping ratio %.4f", z);
    check(z > 0.015 && z < 0.025, "positive damping while the amplitude decays");
    z = zeta_est(3, 1000, 1099, 5.76);
    $display("lab square, growing amplitude: damping ratio %.4f", z);
    check(z < -0.015 && z > -0.025, "negative damping while the amplitude grows");
    // phase 3: flight, 2 signals x 3 modes
    freqs = '{5.2, 7.46, 12.5, 5.2, 7.46, 12.5};
    lens  = '{512, 512, 512, 512, 512, 512};
    run_phase(3, 800);
    for (int c = 0; c < N_CHANNELS; c++) begin
      f = freq_est(c, 520, 800);
      $display("flight: channel %0d (input %0d) mode %.2f Hz found %.3f Hz", c, c / N_MODES, freqs[c], f);
      check(f > freqs[c] - 0.1 && f < freqs[c] + 0.1, $sformatf("flight channel %0d frequency", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
