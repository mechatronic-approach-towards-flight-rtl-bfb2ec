// Sampling clock of the analog-to-digital converters.
//
// The ADCs are triggered from the FPGA at a frequency the processor
// programs between 10 and 200 Hz. The timer is a phase accumulator: every
// clock cycle it adds the requested rate in hertz and, whenever the sum
// reaches CLK_HZ, subtracts CLK_HZ and emits a one-cycle trigger. The
// average trigger rate is therefore exactly rate_hz, with no divider, and
// the spacing of triggers varies by at most one clock cycle.
// Rates outside 10..200 Hz are clamped to that range.
//
// Interface: enable starts the sampling (the accumulator is cleared while
// disabled, so the first trigger follows ceil(CLK_HZ/rate_hz) cycles after
// enable); trig is a single-cycle pulse.
// The range follows the document; the clock frequency (50 MHz by default)
// and the phase-accumulator method are this design's choice.
module sample_timer #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned MIN_HZ  = 10,
  parameter int unsigned MAX_HZ  = 200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic [7:0] rate_hz,
  output logic       trig
);
  localparam int unsigned PW = $clog2(CLK_HZ + MAX_HZ + 1);

  logic [PW-1:0] phase;
  logic [PW-1:0] step;
  logic [PW-1:0] next;

  always_comb begin
    if (rate_hz < 8'(MIN_HZ))      step = PW'(MIN_HZ);
    else if (rate_hz > 8'(MAX_HZ)) step = PW'(MAX_HZ);
    else                           step = PW'(rate_hz);
    next = phase + step;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      trig  <= 1'b0;
    end else if (!enable) begin
      phase <= '0;
      trig  <= 1'b0;
    end else if (next >= PW'(CLK_HZ)) begin
      phase <= next - PW'(CLK_HZ);
      trig  <= 1'b1;
    end else begin
      phase <= next;
      trig  <= 1'b0;
    end
  end

endmodule
