// Circular sample buffer holding the time window of one input signal.
//
// Each new ADC sample overwrites the oldest one, so the buffer always holds
// the last DEPTH samples. A read names a sample by its age k (0 = newest,
// DEPTH-1 = oldest); the buffer turns the age into an address relative to
// the write pointer. Samples that have not yet been written since reset
// (age >= number of samples written) read as zero, so the first windows
// after start-up behave as if the signal was zero before it.
//
// Timing: write in one cycle; read is synchronous, data appears the cycle
// after rd_en. A write and a read in the same cycle are allowed (the read
// then sees the state before the write). The 512-sample window follows the
// prototype; the zero-fill at start-up is this design's choice.
module circ_buffer #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned W     = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         wr_en,     // store a new sample
  input  logic signed [W-1:0]          wr_data,
  input  logic                         rd_en,
  input  logic [$clog2(DEPTH)-1:0]     rd_age,    // k: age of the sample to read
  output logic signed [W-1:0]          rd_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic signed [W-1:0] mem [DEPTH];
  logic [AW-1:0]       newest;      // address of the newest sample
  logic [AW:0]         fill;        // number of valid samples, saturates at DEPTH
  logic signed [W-1:0] ram_q;
  logic                zero_q;

  always_ff @(posedge clk) begin
    if (wr_en) mem[AW'(newest + 1'b1)] <= wr_data;
    if (rd_en) ram_q <= mem[AW'(newest - rd_age)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      newest <= '1;             // first write goes to address 0
      fill   <= '0;
      zero_q <= 1'b1;
    end else begin
      if (wr_en) begin
        newest <= AW'(newest + 1'b1);
        if (fill != (AW+1)'(DEPTH)) fill <= fill + 1'b1;
      end
      if (rd_en) zero_q <= ({1'b0, rd_age} >= fill);
    end
  end

  assign rd_data = zero_q ? '0 : ram_q;

endmodule
