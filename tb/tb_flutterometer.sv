// End-to-end testbench of flutterometer at a scaled clock (CLK_HZ = 120 kHz,
// 200 Hz sampling, 600 cycles per sample) over 1500 windows, so the circular
// buffers wrap, the tail-signal mode turns unstable and raises the alarm,
// and a slow ADC finally overruns the sampling. See flutter_e2e_body.svh
// for what is driven and checked.
module tb_flutterometer;
  localparam int CLK_HZ        = 120_000;
  localparam int RATE          = 200;
  localparam int N_WIN         = 1500;
  localparam bit CHECK_OVERRUN = 1'b1;

  `include "flutter_e2e_body.svh"

  flutterometer #(.CLK_HZ(CLK_HZ)) dut (.*);
endmodule
