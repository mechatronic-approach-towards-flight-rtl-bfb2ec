// Self-checking testbench of conv_recon_unit: sweeps windows of 512 random
// taps (random samples, complex wavelet points, wavelet length and gain,
// including full-scale values) back to back and with gaps, and compares
// re, im and the reconstructed value with sums computed in 64-bit integer
// arithmetic. Checks that res_valid rises exactly 3 cycles after the last
// tap.
module tb_conv_recon_unit;
  import flutter_pkg::*;

  localparam int TAPS = 512;

  logic                       clk = 1'b0;
  logic                       rst_n = 1'b0;
  tap_ctl_t                   tap = '0;
  logic signed [15:0]         x = '0, w_re = '0, w_im = '0, gain = '0;
  logic [9:0]                 len = '0;
  logic signed [31:0]         res_re, res_im, res_rec;
  logic                       res_valid;
  int                         checks = 0, failures = 0;

  conv_recon_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint fl_shift(input longint v, input int s);
    return v >>> s;          // arithmetic: floor division by 2^s
  endfunction

  task automatic window(input int mode, input bit gap);
    longint sr, si, er, ei, erec;
    int     last_cyc, valid_cyc, cyc;
    len  = (mode == 0) ? 10'd512 : 10'($urandom_range(1, 512));
    gain = (mode == 1) ? 16'sh7FFF : 16'($urandom);
    sr = 0; si = 0;
    for (int k = 0; k < TAPS; k++) begin
      @(negedge clk);
      if (mode == 1) begin x = -16'sd32768; w_re = -16'sd32768; w_im = 16'sh7FFF; end
      else begin x = 16'($urandom); w_re = 16'($urandom); w_im = 16'($urandom); end
      tap.valid = 1'b1; tap.first = (k == 0); tap.last = (k == TAPS - 1); tap.idx = 16'(k);
      if (k < int'(len)) begin
        sr += longint'(x) * longint'(w_re);
        si += longint'(x) * longint'(w_im);
      end
    end
    er = fl_shift(sr, 15); ei = fl_shift(si, 15);
    erec = fl_shift(er * longint'(gain), 15);
    cyc = 0; valid_cyc = -1;
    @(negedge clk);
    tap = '0;
    while (!res_valid && cyc < 10) begin
      cyc++;
      @(negedge clk);
    end
    // cyc counts negedges after the one following the last tap
    checks += 4;
    if (cyc != 2) begin failures++; $display("FAIL latency: valid %0d cycles late", cyc - 2); end
    if (res_re  !== 32'(er))   begin failures++; $display("FAIL re %0d expected %0d", res_re, er); end
    if (res_im  !== 32'(ei))   begin failures++; $display("FAIL im %0d expected %0d", res_im, ei); end
    if (res_rec !== 32'(erec)) begin failures++; $display("FAIL rec %0d expected %0d", res_rec, erec); end
    if (gap) repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    window(0, 1'b0);
    window(1, 1'b1);                 // full-scale extremes
    for (int i = 0; i < 30; i++) window(2, i[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
