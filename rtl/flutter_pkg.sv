// Shared constants and types of the flutterometer hardware.
//
// The wavelet accelerator filters every input signal with several stored
// complex wavelets, one per vibration mode. The numbers here (two inputs,
// three modes each, a 512-sample window, 1024-point wavelet tables) are the
// configuration of the prototype; the word widths are this design's choice.
package flutter_pkg;

  // Accelerator geometry
  localparam int unsigned N_INPUTS   = 2;     // accelerometer signals
  localparam int unsigned N_MODES    = 3;     // wavelet-filtered modes per signal
  localparam int unsigned N_CHANNELS = N_INPUTS * N_MODES;
  localparam int unsigned WINDOW     = 512;   // samples in the time window
  localparam int unsigned WAVE_PTS   = 1024;  // stored points per wavelet (re + im)

  // Fixed-point word widths (chosen here)
  localparam int unsigned SAMPLE_W = 16;      // signed ADC code
  localparam int unsigned COEF_W   = 16;      // signed Q1.15 wavelet point / gain
  localparam int unsigned ACC_W    = 48;      // accumulator, sized like a DSP block
  localparam int unsigned RES_W    = 32;      // result words on the bus
  localparam int unsigned FRAC     = 15;      // fraction bits of COEF_W words

  // Bus
  localparam int unsigned AV_ADDR_W = 14;     // word address of the accelerator slave
  localparam int unsigned AV_DATA_W = 32;

  // One tap of the convolution sweep, as broadcast to every unit.
  typedef struct packed {
    logic        valid;   // a tap is on the buses this cycle
    logic        first;   // tap 0: clear the accumulators
    logic        last;    // final tap of the window: results follow
    logic [15:0] idx;     // tap index k (0 = newest sample)
  } tap_ctl_t;

  // Result of one channel for one sample instant.
  typedef struct packed {
    logic signed [RES_W-1:0] re;    // real part of the wavelet coefficient
    logic signed [RES_W-1:0] im;    // imaginary part
    logic signed [RES_W-1:0] rec;   // reconstructed mode signal
  } chan_result_t;

  // Custom instruction selector (Nios II "n" field)
  typedef enum logic [1:0] {
    CI_ADD   = 2'd0,
    CI_MUL   = 2'd1,
    CI_RECIP = 2'd2,
    CI_SQRT  = 2'd3
  } ci_op_e;

  localparam logic [31:0] FP_QNAN = 32'h7FC0_0000;

endpackage
