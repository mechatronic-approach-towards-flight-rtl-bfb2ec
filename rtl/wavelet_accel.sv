// Wavelet filtering accelerator: the fixed-point part of the flutter
// monitoring algorithm.
//
// Every sampling instant, each of the N_IN accelerometer signals is
// filtered by N_MODES stored complex wavelets, one per structural vibration
// mode, giving N_IN*N_MODES channels (2 x 3 = 6 in the prototype). Per
// channel the accelerator returns the complex wavelet coefficient over the
// last WINDOW samples and the reconstructed mode signal, which the processor
// then feeds to its recursive least-squares identification.
//
// Structure: a sampling timer triggers the ADCs; a single master control
// unit stores the new samples in one circular buffer per input and sweeps
// the window, reading all circular buffers and all wavelet tables in the
// same cycle; one convolution/reconstruction unit per channel accumulates in
// lock step, channel c taking its samples from input c / N_MODES. The
// processor reaches the accelerator through the bus slave (see accel_regs
// for the register map), which also raises the DMA request when a window is
// finished.
//
// Timing: one window takes WINDOW + 5 clock cycles after the ADC reports
// its samples, whatever the number of channels; at 50 MHz and 200 Hz
// sampling that is about 0.1 % of the sample period.
// The partitioning (timer, master control, circular buffers, wavelet
// buffers, identical parallel units, status bits and DMA request) follows
// the document; word widths and the bus map are this design's choice.
module wavelet_accel
  import flutter_pkg::*;
#(
  parameter int unsigned N_IN   = N_INPUTS,
  parameter int unsigned N_MOD  = N_MODES,
  parameter int unsigned DEPTH  = WINDOW,
  parameter int unsigned PTS    = WAVE_PTS,
  parameter int unsigned CLK_HZ = 50_000_000
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // bus slave
  input  logic [AV_ADDR_W-1:0]          av_address,
  input  logic                          av_read,
  input  logic                          av_write,
  input  logic [AV_DATA_W-1:0]          av_writedata,
  output logic [AV_DATA_W-1:0]          av_readdata,
  // ADCs
  output logic                          adc_start,
  input  logic                          adc_done,
  input  logic [N_IN-1:0][SAMPLE_W-1:0] adc_data,
  // to the DMA controller / processor
  output logic                          dma_req,
  output logic                          irq
);
  localparam int unsigned N_CH  = N_IN * N_MOD;
  localparam int unsigned LEN_W = $clog2(DEPTH) + 1;
  localparam int unsigned AW    = $clog2(DEPTH);

  // configuration and status
  logic                         smp_enable;
  logic [7:0]                   rate_hz;
  logic [N_CH-1:0][LEN_W-1:0]   len;
  logic [N_CH-1:0][COEF_W-1:0]  gain;
  logic                         wv_we;
  logic [$clog2(N_CH)-1:0]      wv_ch;
  logic [$clog2(PTS)-1:0]       wv_addr;
  logic [COEF_W-1:0]            wv_data;
  logic                         done, overrun, busy, trig;
  chan_result_t [N_CH-1:0]      results;
  logic [N_IN-1:0][SAMPLE_W-1:0] samples;

  // sweep
  logic                          buf_wr, rd_en;
  logic [N_IN-1:0][SAMPLE_W-1:0] buf_data;
  logic [AW-1:0]                 rd_age;
  tap_ctl_t                      tap;
  logic signed [SAMPLE_W-1:0]    x     [N_IN];
  logic signed [COEF_W-1:0]      w_re  [N_CH];
  logic signed [COEF_W-1:0]      w_im  [N_CH];
  logic [N_CH-1:0]               res_valid;

  accel_regs #(.N_CH(N_CH), .N_IN(N_IN), .PTS(PTS), .DEPTH(DEPTH), .LEN_W(LEN_W)) u_regs (
    .clk, .rst_n,
    .address(av_address), .read(av_read), .write(av_write),
    .writedata(av_writedata), .readdata(av_readdata),
    .smp_enable, .rate_hz, .len, .gain,
    .wv_we, .wv_ch, .wv_addr, .wv_data,
    .done, .overrun, .busy, .results, .samples,
    .dma_req, .irq
  );

  sample_timer #(.CLK_HZ(CLK_HZ)) u_timer (
    .clk, .rst_n, .enable(smp_enable), .rate_hz, .trig
  );

  master_ctrl #(.N_IN(N_IN), .DEPTH(DEPTH), .X_W(SAMPLE_W)) u_master (
    .clk, .rst_n, .trig,
    .adc_start, .adc_done, .adc_data,
    .buf_wr, .buf_data,
    .rd_en, .rd_age, .tap,
    .units_valid(&res_valid), .done, .busy, .overrun
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      samples <= '0;
    else if (buf_wr) samples <= buf_data;
  end

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    circ_buffer #(.DEPTH(DEPTH), .W(SAMPLE_W)) u_buf (
      .clk, .rst_n,
      .wr_en(buf_wr), .wr_data(buf_data[i]),
      .rd_en, .rd_age, .rd_data(x[i])
    );
  end

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    wavelet_ram #(.POINTS(PTS), .W(COEF_W)) u_wave (
      .clk,
      .wr_en(wv_we && (wv_ch == c)), .wr_addr(wv_addr), .wr_data(wv_data),
      .rd_en, .rd_idx(rd_age[$clog2(PTS)-2:0]),
      .rd_re(w_re[c]), .rd_im(w_im[c])
    );

    conv_recon_unit #(.LEN_W(LEN_W)) u_unit (
      .clk, .rst_n, .tap,
      .x(x[c / N_MOD]), .w_re(w_re[c]), .w_im(w_im[c]),
      .len(len[c]), .gain(gain[c]),
      .res_re(results[c].re), .res_im(results[c].im), .res_rec(results[c].rec),
      .res_valid(res_valid[c])
    );
  end

endmodule
