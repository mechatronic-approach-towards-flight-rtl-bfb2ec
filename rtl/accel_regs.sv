// Bus slave of the wavelet accelerator: configuration, status bits, result
// words, wavelet loading and the DMA request.
//
// The processor is the bus master. It loads the wavelet tables, sets the
// sampling rate, the wavelet length and reconstruction gain of every
// channel, and enables sampling. When the accelerator finishes a window the
// `done` status bit is set and, if enabled, the DMA request (and an
// interrupt) is raised until the status bit is cleared by writing 1 to it.
//
// Word-address map (32-bit words):
//   0x0000 CTRL    [0] sampling enable, [1] interrupt enable, [2] DMA enable
//   0x0001 STATUS  [0] done (write 1 to clear), [1] overrun (write 1 to
//                  clear), [2] busy (read only)
//   0x0002 RATE    [7:0] sampling rate in Hz (10..200), reset value 100
//   0x0003 COUNT   number of completed windows (read only)
//   0x0010+c LEN   [9:0] wavelet length of channel c in complex taps
//   0x0018+c GAIN  [15:0] reconstruction gain of channel c, Q1.15
//   0x0040+4c      result re, +1 im, +2 reconstructed signal (read only)
//   0x0080+i       newest sample of input i (read only)
//   0x2000+PTS*c+p wavelet point p of channel c (write only; p < PTS/2
//                  real part, p >= PTS/2 imaginary part; PTS = 1024 by
//                  default)
// The map has room for 8 channels and 64 inputs; elaboration stops with an
// error for larger configurations.
// Avalon-MM style slave with no wait states and a fixed read latency of one
// cycle (readdata is valid the cycle after `read`). Unmapped words read 0.
// That results are reported through status bits and a DMA request follows
// the document; the map, the interrupt and the reset values are this
// design's choice.
module accel_regs
  import flutter_pkg::*;
#(
  parameter int unsigned N_CH = N_CHANNELS,
  parameter int unsigned N_IN = N_INPUTS,
  parameter int unsigned PTS  = WAVE_PTS,
  parameter int unsigned DEPTH = WINDOW,
  parameter int unsigned LEN_W = 10
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // bus
  input  logic [AV_ADDR_W-1:0]        address,
  input  logic                        read,
  input  logic                        write,
  input  logic [AV_DATA_W-1:0]        writedata,
  output logic [AV_DATA_W-1:0]        readdata,
  // configuration
  output logic                        smp_enable,
  output logic [7:0]                  rate_hz,
  output logic [N_CH-1:0][LEN_W-1:0]  len,
  output logic [N_CH-1:0][COEF_W-1:0] gain,
  output logic                        wv_we,
  output logic [$clog2(N_CH)-1:0]     wv_ch,
  output logic [$clog2(PTS)-1:0]      wv_addr,
  output logic [COEF_W-1:0]           wv_data,
  // datapath status
  input  logic                        done,
  input  logic                        overrun,
  input  logic                        busy,
  input  chan_result_t [N_CH-1:0]     results,
  input  logic [N_IN-1:0][SAMPLE_W-1:0] samples,
  // requests
  output logic                        dma_req,
  output logic                        irq
);
  localparam int unsigned CW = $clog2(N_CH);
  localparam int unsigned PW = $clog2(PTS);

  if (N_CH < 2 || N_CH > 8 || N_IN > 64 || N_CH * PTS > 8192) begin : g_map_check
    $error("accel_regs: configuration does not fit the register map");
  end

  logic        irq_en, dma_en;
  logic        st_done, st_over;
  logic [31:0] count;

  // wavelet writes: address bit 13 selects the wavelet window
  assign wv_we   = write && address[13];
  assign wv_ch   = CW'(address[12:PW]);
  assign wv_addr = address[PW-1:0];
  assign wv_data = writedata[COEF_W-1:0];

  wire wr_reg = write && !address[13];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp_enable <= 1'b0;
      irq_en     <= 1'b0;
      dma_en     <= 1'b0;
      rate_hz    <= 8'd100;
      st_done    <= 1'b0;
      st_over    <= 1'b0;
      count      <= '0;
      for (int c = 0; c < N_CH; c++) begin
        len[c]  <= LEN_W'(DEPTH);
        gain[c] <= '0;
      end
    end else begin
      if (wr_reg) begin
        case (address[12:0])
          13'h0000: {dma_en, irq_en, smp_enable} <= writedata[2:0];
          13'h0002: rate_hz <= writedata[7:0];
          default: ;
        endcase
        for (int c = 0; c < N_CH; c++) begin
          if (address[12:0] == 13'(16 + c)) len[c]  <= writedata[LEN_W-1:0];
          if (address[12:0] == 13'(24 + c)) gain[c] <= writedata[COEF_W-1:0];
        end
      end
      // status: a new event wins over a clear in the same cycle
      if (done)                                       st_done <= 1'b1;
      else if (wr_reg && address[12:0] == 13'h0001 && writedata[0]) st_done <= 1'b0;
      if (overrun)                                    st_over <= 1'b1;
      else if (wr_reg && address[12:0] == 13'h0001 && writedata[1]) st_over <= 1'b0;
      if (done) count <= count + 1'b1;
    end
  end

  assign dma_req = st_done && dma_en;
  assign irq     = st_done && irq_en;

  // read mux, registered (read latency 1)
  logic [31:0] rmux;
  always_comb begin
    rmux = '0;
    if (!address[13]) begin
      case (address[12:0])
        13'h0000: rmux = {29'b0, dma_en, irq_en, smp_enable};
        13'h0001: rmux = {29'b0, busy, st_over, st_done};
        13'h0002: rmux = {24'b0, rate_hz};
        13'h0003: rmux = count;
        default: ;
      endcase
      for (int c = 0; c < N_CH; c++) begin
        if (address[12:0] == 13'(16 + c))    rmux = 32'(len[c]);
        if (address[12:0] == 13'(24 + c))    rmux = 32'(gain[c]);
        if (address[12:0] == 13'(64 + 4*c))  rmux = results[c].re;
        if (address[12:0] == 13'(65 + 4*c))  rmux = results[c].im;
        if (address[12:0] == 13'(66 + 4*c))  rmux = results[c].rec;
      end
      for (int i = 0; i < N_IN; i++)
        if (address[12:0] == 13'(128 + i)) rmux = {{(32-SAMPLE_W){samples[i][SAMPLE_W-1]}}, samples[i]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    readdata <= '0;
    else if (read) readdata <= rmux;
  end

endmodule
