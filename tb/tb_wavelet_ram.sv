// Self-checking testbench of wavelet_ram: fills the real and imaginary
// halves with independent random points, then reads every tap index and
// checks both outputs arrive together, one cycle after the read, and that
// the read data hold while rd_en is low.
module tb_wavelet_ram;
  localparam int POINTS = 1024;
  localparam int W      = 16;
  localparam int HALF   = POINTS / 2;

  logic                        clk = 1'b0;
  logic                        wr_en = 1'b0, rd_en = 1'b0;
  logic [$clog2(POINTS)-1:0]   wr_addr = '0;
  logic signed [W-1:0]         wr_data = '0;
  logic [$clog2(POINTS)-2:0]   rd_idx = '0;
  logic signed [W-1:0]         rd_re, rd_im;
  logic signed [W-1:0]         ref_pts [POINTS];
  int                          checks = 0, failures = 0;

  wavelet_ram #(.POINTS(POINTS), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] hold_re, hold_im;
    for (int p = 0; p < POINTS; p++) ref_pts[p] = W'($urandom);
    // write in a scrambled order
    for (int p = 0; p < POINTS; p++) begin
      int q;
      q = (p * 389) % POINTS;
      @(negedge clk);
      wr_en = 1'b1; wr_addr = q[$clog2(POINTS)-1:0]; wr_data = ref_pts[q];
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int k = 0; k < HALF; k++) begin
      @(negedge clk);
      rd_en = 1'b1; rd_idx = k[$clog2(POINTS)-2:0];
      @(negedge clk);
      rd_en = 1'b0;
      checks += 2;
      if (rd_re !== ref_pts[k])        begin failures++; $display("FAIL re[%0d]", k); end
      if (rd_im !== ref_pts[k + HALF]) begin failures++; $display("FAIL im[%0d]", k); end
    end
    hold_re = rd_re; hold_im = rd_im;
    rd_idx = '0;
    repeat (3) @(negedge clk);
    checks++;
    if (rd_re !== hold_re || rd_im !== hold_im) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
