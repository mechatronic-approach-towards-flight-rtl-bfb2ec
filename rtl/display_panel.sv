// Front-panel outputs of the flutter monitor: the 4-digit segment display
// of the current damping coefficient, the multicolour LED bar showing the
// flutter margin, and the alarm outputs for a too-small margin.
//
// The processor writes the values; the hardware does the rest:
// * Display: a signed binary value is converted to four BCD digits
//   (shift-and-add-3), each digit decoded to seven segments plus a decimal
//   point, and the four digits are time-multiplexed, each driven for
//   SCAN_DIV clock cycles in turn. A negative value shows '-' in the left
//   digit and at most three digits of magnitude; values out of range show
//   all dashes.
// * LED bar: BAR_LEN two-colour LEDs; `margin` LEDs are lit as a
//   thermometer. The bar is red when margin < threshold, amber (both
//   colours) when margin < 2*threshold, green otherwise.
// * Alarms: alarm[0] follows margin < threshold while alarms are enabled;
//   alarm[1] latches it until the processor acknowledges it.
//
// Register map (word address, write; reads return the written values):
//   0 DISPLAY [15:0] signed value, [17:16] decimal-point digit (0 = right),
//             [18] decimal point on
//   1 MARGIN  [7:0] flutter margin in LEDs (0..BAR_LEN)
//   2 ALARM   [7:0] threshold, [8] alarm enable
//   3 ACK     write 1 to bit 0 to clear the latched alarm
// Outputs are active high; seg = {dp, g, f, e, d, c, b, a}; dig_sel is
// one-hot with bit 0 the rightmost digit. Read latency 1 cycle.
// The three kinds of output follow the document; the number of LEDs, the
// colour zones, the register map and the scan rate are this design's.
module display_panel #(
  parameter int unsigned CLK_HZ   = 50_000_000,
  parameter int unsigned SCAN_DIV = CLK_HZ / 4000,   // 1 kHz per digit cycle
  parameter int unsigned BAR_LEN  = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [1:0]         address,
  input  logic               read,
  input  logic               write,
  input  logic [31:0]        writedata,
  output logic [31:0]        readdata,
  output logic [7:0]         seg,
  output logic [3:0]         dig_sel,
  output logic [BAR_LEN-1:0] bar_red,
  output logic [BAR_LEN-1:0] bar_green,
  output logic [1:0]         alarm
);
  logic signed [15:0] value;
  logic [1:0]         dp_pos;
  logic               dp_on;
  logic [7:0]         margin, threshold;
  logic               alarm_en, alarm_latch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      value <= '0; dp_pos <= '0; dp_on <= 1'b0;
      margin <= '0; threshold <= '0; alarm_en <= 1'b0;
      alarm_latch <= 1'b0; readdata <= '0;
    end else begin
      if (write) begin
        unique case (address)
          2'd0: {dp_on, dp_pos, value} <= writedata[18:0];
          2'd1: margin <= writedata[7:0];
          2'd2: {alarm_en, threshold} <= writedata[8:0];
          default: ;
        endcase
      end
      if (alarm[0])                                      alarm_latch <= 1'b1;
      else if (write && address == 2'd3 && writedata[0]) alarm_latch <= 1'b0;
      if (read) begin
        unique case (address)
          2'd0: readdata <= {13'b0, dp_on, dp_pos, value};
          2'd1: readdata <= {24'b0, margin};
          2'd2: readdata <= {23'b0, alarm_en, threshold};
          default: readdata <= {31'b0, alarm_latch};
        endcase
      end
    end
  end

  // ---------------------------------------------------------------- alarms
  wire low = (margin < threshold);
  assign alarm = {alarm_latch | (alarm_en & low), alarm_en & low};

  // ---------------------------------------------------------------- LED bar
  always_comb begin
    logic amber_zone;
    amber_zone = ({1'b0, margin} < {threshold, 1'b0});
    for (int i = 0; i < BAR_LEN; i++) begin
      logic lit;
      lit          = (margin > 8'(i));
      bar_red[i]   = lit && (low || amber_zone);
      bar_green[i] = lit && !low;
    end
  end

  // ---------------------------------------------------------------- digits
  // character codes: 0-9 digits, 10 minus, 11 blank
  logic [3:0] chars [4];
  always_comb begin
    logic [15:0] mag;
    logic [15:0] bcd;
    logic [13:0] bin;
    logic        neg, over;
    neg  = value[15];
    mag  = neg ? 16'(-value) : 16'(value);
    over = neg ? (mag > 16'd999) : (mag > 16'd9999);
    // shift-and-add-3 conversion of the magnitude
    bin = mag[13:0];
    bcd = '0;
    for (int i = 13; i >= 0; i--) begin
      for (int d = 0; d < 4; d++)
        if (bcd[4*d +: 4] > 4'd4) bcd[4*d +: 4] = bcd[4*d +: 4] + 4'd3;
      bcd = {bcd[14:0], bin[i]};
    end
    for (int d = 0; d < 4; d++) chars[d] = bcd[4*d +: 4];
    // blank leading zeros left of the decimal point digit
    for (int d = 3; d > 0; d--) begin
      logic lead;
      lead = 1'b1;
      for (int e = 3; e >= d; e--) if (bcd[4*e +: 4] != 0) lead = 1'b0;
      if (lead && (!dp_on || d > int'(dp_pos))) chars[d] = 4'd11;
    end
    if (neg) chars[3] = 4'd10;
    if (over) for (int d = 0; d < 4; d++) chars[d] = 4'd10;
  end

  function automatic logic [6:0] seg7(input logic [3:0] c);
    unique case (c)            // gfedcba
      4'd0: seg7 = 7'b0111111;
      4'd1: seg7 = 7'b0000110;
      4'd2: seg7 = 7'b1011011;
      4'd3: seg7 = 7'b1001111;
      4'd4: seg7 = 7'b1100110;
      4'd5: seg7 = 7'b1101101;
      4'd6: seg7 = 7'b1111101;
      4'd7: seg7 = 7'b0000111;
      4'd8: seg7 = 7'b1111111;
      4'd9: seg7 = 7'b1101111;
      4'd10: seg7 = 7'b1000000;
      default: seg7 = 7'b0000000;
    endcase
  endfunction

  // scan
  localparam int unsigned SW = (SCAN_DIV > 1) ? $clog2(SCAN_DIV) : 1;
  logic [SW-1:0] scan_cnt;
  logic [1:0]    digit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scan_cnt <= '0;
      digit    <= '0;
    end else if (scan_cnt == SW'(SCAN_DIV - 1)) begin
      scan_cnt <= '0;
      digit    <= digit + 1'b1;
    end else begin
      scan_cnt <= scan_cnt + 1'b1;
    end
  end

  always_comb begin
    dig_sel = 4'b0001 << digit;
    seg     = {dp_on && (dp_pos == digit), seg7(chars[digit])};
  end

endmodule
