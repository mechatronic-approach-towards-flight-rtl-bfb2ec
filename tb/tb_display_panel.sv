// Self-checking testbench of display_panel with a short scan period
// (SCAN_DIV = 4): for positive, negative, out-of-range and decimal-point
// values it follows the digit scan and compares every digit's segments
// with a pattern worked out from the decimal text of the value; it checks
// that each digit is driven for SCAN_DIV cycles, the LED bar length and
// colour zones for a sweep of margins, the live and latched alarm outputs
// with acknowledge, and register read-back.
module tb_display_panel;
  localparam int SCAN = 4;
  localparam int BAR  = 10;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic [1:0]      address = '0;
  logic            read = 1'b0, write = 1'b0;
  logic [31:0]     writedata = '0, readdata;
  logic [7:0]      seg;
  logic [3:0]      dig_sel;
  logic [BAR-1:0]  bar_red, bar_green;
  logic [1:0]      alarm;
  int              checks = 0, failures = 0;

  display_panel #(.CLK_HZ(1000), .SCAN_DIV(SCAN), .BAR_LEN(BAR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk);
    address = 2'(a); writedata = d; write = 1'b1;
    @(negedge clk);
    write = 1'b0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // segment patterns, gfedcba, of the characters of a 4-character string
  function automatic logic [6:0] glyph(input byte ch);
    case (ch)
      "0": return 7'h3F; "1": return 7'h06; "2": return 7'h5B; "3": return 7'h4F;
      "4": return 7'h66; "5": return 7'h6D; "6": return 7'h7D; "7": return 7'h07;
      "8": return 7'h7F; "9": return 7'h6F; "-": return 7'h40;
      default: return 7'h00;
    endcase
  endfunction

  // text: 4 characters, leftmost first; dp: digit index from the right or -1
  task automatic show(input int value, input int dp, input string text);
    logic [6:0] got [4];
    logic [3:0] dps;
    int         seen, run_len;
    wr(0, {13'b0, dp >= 0, 2'(dp >= 0 ? dp : 0), 16'(value)});
    // wait for a scan to start at digit 0
    while (dig_sel != 4'b0001) @(negedge clk);
    while (dig_sel == 4'b0001) @(negedge clk);
    while (dig_sel != 4'b0001) @(negedge clk);
    seen = 0; dps = '0;
    for (int d = 0; d < 4; d++) begin
      run_len = 0;
      check(dig_sel == (4'b0001 << d), $sformatf("digit select %b for digit %0d", dig_sel, d));
      got[d] = seg[6:0]; dps[d] = seg[7];
      while (dig_sel == (4'b0001 << d)) begin
        run_len++;
        @(negedge clk);
      end
      check(run_len == SCAN, $sformatf("digit %0d held %0d cycles", d, run_len));
    end
    for (int d = 0; d < 4; d++)
      check(got[d] == glyph(text[3 - d]),
            $sformatf("value %0d digit %0d: %h expected '%s'", value, d, got[d], text));
    check(dps == ((dp >= 0) ? (4'b0001 << dp) : 4'b0000), $sformatf("value %0d decimal point %b", value, dps));
  endtask

  task automatic bar(input int margin, input int thr, input bit en);
    bit low, amber;
    wr(1, 32'(margin));
    wr(2, {23'b0, en, 8'(thr)});
    low   = margin < thr;
    amber = margin < 2 * thr;
    for (int i = 0; i < BAR; i++) begin
      bit lit;
      lit = (i < margin);
      check(bar_green[i] == (lit && !low), $sformatf("green %0d at margin %0d thr %0d", i, margin, thr));
      check(bar_red[i] == (lit && (low || amber)), $sformatf("red %0d at margin %0d thr %0d", i, margin, thr));
    end
    check(alarm[0] == (en && low), $sformatf("live alarm at margin %0d thr %0d", margin, thr));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    show(1234, -1, "1234");
    show(7, -1, "   7");
    show(35, 2, " 035");        // 0.35 style: digits up to the point are kept
    show(-5, -1, "-  5");
    show(-999, -1, "-999");
    show(-1000, -1, "----");
    show(12000, -1, "----");
    show(9999, 3, "9999");
    show(0, 0, "   0");
    // readback
    @(negedge clk); address = 2'd0; read = 1'b1;
    @(negedge clk); read = 1'b0;
    check(readdata == 32'h0004_0000, "display readback");
    // LED bar and alarms
    for (int m = 0; m <= BAR + 1; m++) bar(m, 3, 1'b1);
    bar(1, 3, 1'b0);
    bar(0, 0, 1'b1);
    // latched alarm survives the margin recovering, until acknowledged
    bar(1, 4, 1'b1);
    bar(9, 4, 1'b1);
    check(alarm == 2'b10, "latched alarm holds");
    wr(3, 32'h1);
    check(alarm == 2'b00, "alarm acknowledged");
    @(negedge clk); address = 2'd3; read = 1'b1;
    @(negedge clk); read = 1'b0;
    check(readdata == 32'h0, "latch readback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
