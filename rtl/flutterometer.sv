// Flutter monitor: FPGA hardware that estimates, during flight, how close
// an aircraft structure is to flutter.
//
// The monitoring algorithm isolates individual vibration modes of the
// measured accelerations with complex wavelet filters, identifies each
// mode with a recursive least-squares (RLS) model and derives its natural
// frequency and damping ratio; a damping ratio that falls towards zero
// means the flutter margin is shrinking. The work is split between
// hardware and software on an embedded soft processor:
// * wavelet_accel - the fixed-point wavelet convolution and reconstruction
//   of 2 signals x 3 modes over a 512-sample window, with ADC triggering,
//   status bits and a DMA request (a bus slave of the processor);
// * fp_ci - floating-point add, multiply, reciprocal and square root as
//   custom instructions of the processor, which runs RLS and damping;
// * display_panel - segment display, LED bar and alarm outputs, a bus
//   slave of the processor;
// * serial_tx - the serial output that sends result bytes written by the
//   processor to external devices, a bus slave of the processor.
// The processor, its bus fabric, DMA controller and memories, and the
// USB and DAC interfaces are not part of this RTL: the signals that
// connect to them are ports of this module, so the processor side can be a
// model in simulation or a generated system on the chip.
//
// Clocking: one clock (CLK_HZ, 50 MHz by default) and one active-low
// asynchronous reset for all blocks; the custom-instruction port uses the
// processor's active-high reset convention and is derived from rst_n.
module flutterometer
  import flutter_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned BAR_LEN = 10
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // accelerator bus slave
  input  logic [AV_ADDR_W-1:0]          acc_address,
  input  logic                          acc_read,
  input  logic                          acc_write,
  input  logic [AV_DATA_W-1:0]          acc_writedata,
  output logic [AV_DATA_W-1:0]          acc_readdata,
  output logic                          acc_dma_req,
  output logic                          acc_irq,
  // analog-to-digital converters
  output logic                          adc_start,
  input  logic                          adc_done,
  input  logic [N_INPUTS-1:0][SAMPLE_W-1:0] adc_data,
  // floating-point custom instruction
  input  logic                          ci_clk_en,
  input  logic                          ci_start,
  input  logic [1:0]                    ci_n,
  input  logic [31:0]                   ci_dataa,
  input  logic [31:0]                   ci_datab,
  output logic [31:0]                   ci_result,
  output logic                          ci_done,
  // panel bus slave
  input  logic [1:0]                    pnl_address,
  input  logic                          pnl_read,
  input  logic                          pnl_write,
  input  logic [31:0]                   pnl_writedata,
  output logic [31:0]                   pnl_readdata,
  // panel outputs
  output logic [7:0]                    seg,
  output logic [3:0]                    dig_sel,
  output logic [BAR_LEN-1:0]            bar_red,
  output logic [BAR_LEN-1:0]            bar_green,
  output logic [1:0]                    alarm,
  // serial output bus slave and line
  input  logic [1:0]                    ser_address,
  input  logic                          ser_read,
  input  logic                          ser_write,
  input  logic [31:0]                   ser_writedata,
  output logic [31:0]                   ser_readdata,
  output logic                          ser_txd
);

  wavelet_accel #(.CLK_HZ(CLK_HZ)) u_accel (
    .clk, .rst_n,
    .av_address(acc_address), .av_read(acc_read), .av_write(acc_write),
    .av_writedata(acc_writedata), .av_readdata(acc_readdata),
    .adc_start, .adc_done, .adc_data,
    .dma_req(acc_dma_req), .irq(acc_irq)
  );

  fp_ci u_fpu (
    .clk, .reset(!rst_n), .clk_en(ci_clk_en), .start(ci_start), .n(ci_n),
    .dataa(ci_dataa), .datab(ci_datab), .result(ci_result), .done(ci_done)
  );

  display_panel #(.CLK_HZ(CLK_HZ), .BAR_LEN(BAR_LEN)) u_panel (
    .clk, .rst_n,
    .address(pnl_address), .read(pnl_read), .write(pnl_write),
    .writedata(pnl_writedata), .readdata(pnl_readdata),
    .seg, .dig_sel, .bar_red, .bar_green, .alarm
  );

  serial_tx #(.CLK_HZ(CLK_HZ)) u_serial (
    .clk, .rst_n,
    .address(ser_address), .read(ser_read), .write(ser_write),
    .writedata(ser_writedata), .readdata(ser_readdata),
    .txd(ser_txd)
  );

endmodule
