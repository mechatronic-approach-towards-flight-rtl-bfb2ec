// Single-precision floating-point adder, used as a processor custom
// instruction for the recursive least-squares and damping computations.
//
// Operands and result are IEEE-754 binary32. The smaller operand is aligned
// to the larger one with guard, round and sticky bits, the significands are
// added or subtracted, the sum is normalised (leading-zero count for
// cancellation) and rounded to nearest, ties to even. Subnormal operands
// and results are flushed to zero; overflow gives infinity; any NaN, or
// infinity minus infinity, gives the quiet NaN 0x7FC00000. The sign of an
// exact zero sum is + unless both operands are -0.
//
// Timing: multi-cycle custom instruction handshake; the result is
// registered and `done` is high in the cycle after the one in which `start` is high.
// That addition is a hardware custom instruction follows the document; the
// number format, rounding and exception handling are this design's choice.
module fp_add
  import flutter_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] result,
  output logic        done
);
  logic [31:0] r;

  always_comb begin
    logic        sa, sb, sx, sy, sub;
    logic [7:0]  ea, eb, ex, ey, d;
    logic [23:0] ma, mb, mx, my;
    logic [26:0] xx, yy, ys;
    logic [27:0] sum;
    logic [26:0] nrm;
    logic [4:0]  lz;
    logic [9:0]  e;
    logic [24:0] mr;
    logic        rnd, stk;
    logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;

    sa = a[31]; ea = a[30:23]; ma = {1'b1, a[22:0]};
    sb = b[31]; eb = b[30:23]; mb = {1'b1, b[22:0]};
    a_nan  = (ea == 8'hFF) && (a[22:0] != 0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != 0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == 0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == 0);
    a_zero = (ea == 8'h00);
    b_zero = (eb == 8'h00);

    // order by magnitude: x is the larger
    if ({ea, a[22:0]} >= {eb, b[22:0]}) begin
      sx = sa; ex = ea; mx = ma; sy = sb; ey = eb; my = mb;
    end else begin
      sx = sb; ex = eb; mx = mb; sy = sa; ey = ea; my = ma;
    end
    sub = sx ^ sy;
    d   = ex - ey;

    // align: 24 significand bits + guard, round, sticky
    xx = {mx, 3'b000};
    yy = {my, 3'b000};
    if (d >= 8'd27) ys = 27'd1;                       // all of y is sticky
    else begin
      ys = yy >> d;
      if ((yy & ((27'd1 << d) - 27'd1)) != 0) ys[0] = 1'b1;
    end

    sum = sub ? {1'b0, xx} - {1'b0, ys} : {1'b0, xx} + {1'b0, ys};

    // normalise
    e  = {2'b00, ex};
    lz = '0;
    if (sum[27]) begin
      nrm = sum[27:1];
      nrm[0] = sum[1] | sum[0];
      e = e + 10'd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) begin lz = 5'(26 - i); break; end
      end
      nrm = sum[26:0] << lz;
      e   = e - {5'b0, lz};
    end

    // round to nearest even
    rnd = nrm[2];
    stk = nrm[1] | nrm[0];
    mr  = {1'b0, nrm[26:3]} + {24'b0, rnd & (stk | nrm[3])};
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 10'd1;
    end

    // pack
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      r = FP_QNAN;
    else if (a_inf)  r = {sa, 8'hFF, 23'b0};
    else if (b_inf)  r = {sb, 8'hFF, 23'b0};
    else if (a_zero && b_zero) r = {sa & sb, 31'b0};
    else if (a_zero) r = b;
    else if (b_zero) r = a;
    else if (sum == 28'd0) r = 32'b0;
    else if ($signed(e) >= 10'sd255) r = {sx, 8'hFF, 23'b0};
    else if ($signed(e) <= 10'sd0)   r = {sx, 31'b0};
    else r = {sx, e[7:0], mr[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result <= '0;
      done   <= 1'b0;
    end else begin
      done <= start;
      if (start) result <= r;
    end
  end

endmodule
