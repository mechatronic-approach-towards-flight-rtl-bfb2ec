// Full-size run of flutterometer with every parameter at its default
// (50 MHz clock): the processor model loads all six 1024-point wavelets,
// samples at 200 Hz for 24 windows, checks all results and drives the
// floating-point custom instructions and the display. See
// flutter_e2e_body.svh for what is driven and checked.
module tb_flutterometer_full;
  localparam int CLK_HZ        = 50_000_000;
  localparam int RATE          = 200;
  localparam int N_WIN         = 24;
  localparam bit CHECK_OVERRUN = 1'b0;

  `include "flutter_e2e_body.svh"

  flutterometer dut (.*);
endmodule
