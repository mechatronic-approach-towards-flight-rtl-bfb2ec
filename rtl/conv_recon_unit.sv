// Convolution and signal reconstruction unit of one channel (one mode of
// one input signal).
//
// For each new sample instant n the master control unit sweeps the tap
// index k over the whole time window and broadcasts the sample x[n-k] and
// this channel's complex wavelet point psi[k] to the unit. The unit forms
//   re[n] = sum_{k<len} psi_re[k] * x[n-k]      (the convolution)
//   im[n] = sum_{k<len} psi_im[k] * x[n-k]
// and, in the same pass, the reconstructed mode signal
//   rec[n] = gain * re[n]
// which is the single-scale inverse wavelet transform: the real part of the
// coefficient scaled by the reconstruction constant of this wavelet. Taps at
// or beyond the channel's wavelet length `len` add nothing, so each channel
// can use its own wavelet length while all units run in lock step.
//
// Arithmetic is fixed point: x is a signed integer, psi and gain are Q1.15,
// the accumulators are ACC_W bits wide and cannot overflow for a 512-tap
// window. re and im are returned as integers (accumulator >>> 15), rec as
// (re * gain) >>> 15, all truncated toward minus infinity.
//
// Timing: products are registered one cycle after the tap, accumulated the
// next, and the result appears with res_valid three cycles after the tap
// marked `last`. A new window may start right after the last tap.
// Fixed-point arithmetic and parallel identical units follow the document;
// the word widths, the complex wavelet and the gain form are this design's.
module conv_recon_unit
  import flutter_pkg::*;
#(
  parameter int unsigned X_W   = SAMPLE_W,
  parameter int unsigned C_W   = COEF_W,
  parameter int unsigned A_W   = ACC_W,
  parameter int unsigned R_W   = RES_W,
  parameter int unsigned LEN_W = 10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  tap_ctl_t               tap,      // aligned with x, w_re, w_im
  input  logic signed [X_W-1:0]  x,
  input  logic signed [C_W-1:0]  w_re,
  input  logic signed [C_W-1:0]  w_im,
  input  logic [LEN_W-1:0]       len,      // taps used by this channel
  input  logic signed [C_W-1:0]  gain,     // reconstruction constant, Q1.15
  output logic signed [R_W-1:0]  res_re,
  output logic signed [R_W-1:0]  res_im,
  output logic signed [R_W-1:0]  res_rec,
  output logic                   res_valid
);
  localparam int unsigned P_W = X_W + C_W;

  // stage 1: products
  logic signed [P_W-1:0] p_re, p_im;
  logic                  v1, f1, l1;
  // stage 2: accumulation
  logic signed [A_W-1:0] acc_re, acc_im;
  logic                  l2;

  wire in_len = ({{(16-LEN_W){1'b0}}, len} > tap.idx);
  logic signed [P_W-1:0] m_re, m_im;
  assign m_re = x * w_re;
  assign m_im = x * w_im;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; f1 <= 1'b0; l1 <= 1'b0; l2 <= 1'b0;
      p_re <= '0; p_im <= '0;
      acc_re <= '0; acc_im <= '0;
    end else begin
      v1 <= tap.valid;
      f1 <= tap.valid & tap.first;
      l1 <= tap.valid & tap.last;
      p_re <= (tap.valid && in_len) ? m_re : '0;
      p_im <= (tap.valid && in_len) ? m_im : '0;
      if (v1) begin
        acc_re <= (f1 ? '0 : acc_re) + A_W'(p_re);
        acc_im <= (f1 ? '0 : acc_im) + A_W'(p_im);
      end
      l2 <= l1;
    end
  end

  // stage 3: scale, reconstruct, hold
  logic signed [R_W-1:0]     coef_re, coef_im;
  logic signed [R_W+C_W-1:0] rec_full;

  always_comb begin
    coef_re  = R_W'(acc_re >>> FRAC);
    coef_im  = R_W'(acc_im >>> FRAC);
    rec_full = coef_re * gain;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_re <= '0; res_im <= '0; res_rec <= '0; res_valid <= 1'b0;
    end else begin
      res_valid <= l2;
      if (l2) begin
        res_re  <= coef_re;
        res_im  <= coef_im;
        res_rec <= R_W'(rec_full >>> FRAC);
      end
    end
  end

endmodule
