// Wavelet table of one accelerator channel.
//
// The processor computes the wavelet of each mode at initialisation and
// writes it here point by point. The table has POINTS entries of a complex
// wavelet: points 0..POINTS/2-1 are the real part, points POINTS/2..POINTS-1
// the imaginary part, both indexed by tap k. The two halves sit in separate
// banks so that the convolution reads the real and imaginary point of one
// tap in the same cycle.
//
// Interface: write port (wr_en, wr_addr over all POINTS, wr_data, Q1.15);
// read port (rd_en, rd_idx = tap k) with one cycle of latency.
// The 1024-point size follows the prototype; the complex layout is this
// design's reading of it.
module wavelet_ram #(
  parameter int unsigned POINTS = 1024,
  parameter int unsigned W      = 16
) (
  input  logic                          clk,
  input  logic                          wr_en,
  input  logic [$clog2(POINTS)-1:0]     wr_addr,
  input  logic signed [W-1:0]           wr_data,
  input  logic                          rd_en,
  input  logic [$clog2(POINTS)-2:0]     rd_idx,
  output logic signed [W-1:0]           rd_re,
  output logic signed [W-1:0]           rd_im
);
  localparam int unsigned HALF = POINTS / 2;
  localparam int unsigned HW   = $clog2(POINTS) - 1;

  logic signed [W-1:0] bank_re [HALF];
  logic signed [W-1:0] bank_im [HALF];

  wire           wr_im  = wr_addr[HW];
  wire [HW-1:0]  wr_idx = wr_addr[HW-1:0];

  always_ff @(posedge clk) begin
    if (wr_en && !wr_im) bank_re[wr_idx] <= wr_data;
    if (wr_en &&  wr_im) bank_im[wr_idx] <= wr_data;
    if (rd_en) begin
      rd_re <= bank_re[rd_idx];
      rd_im <= bank_im[rd_idx];
    end
  end

endmodule
