// Single-precision floating-point multiplier, used as a processor custom
// instruction for the recursive least-squares and damping computations.
//
// The 24-bit significands are multiplied into a 48-bit product, which is
// normalised by at most one place and rounded to nearest, ties to even
// (round bit plus sticky of the bits below it). Exponents add with the
// bias removed. Subnormal operands and results are flushed to zero,
// overflow gives infinity, NaN operands and infinity times zero give the
// quiet NaN 0x7FC00000. The sign is the XOR of the operand signs.
//
// Timing: multi-cycle custom instruction handshake; the result is
// registered and `done` is high in the cycle after the one in which `start` is high.
// That multiplication is a hardware custom instruction follows the
// document; the number format and exception handling are this design's.
module fp_mul
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
    logic        s;
    logic [7:0]  ea, eb;
    logic [47:0] p;
    logic [9:0]  e;
    logic [23:0] m;
    logic [24:0] mr;
    logic        rnd, stk;
    logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;

    ea = a[30:23];
    eb = b[30:23];
    s  = a[31] ^ b[31];
    a_nan  = (ea == 8'hFF) && (a[22:0] != 0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != 0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == 0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == 0);
    a_zero = (ea == 8'h00);
    b_zero = (eb == 8'h00);

    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = {2'b00, ea} + {2'b00, eb} - 10'd127;
    if (p[47]) begin
      m   = p[47:24];
      rnd = p[23];
      stk = |p[22:0];
      e   = e + 10'd1;
    end else begin
      m   = p[46:23];
      rnd = p[22];
      stk = |p[21:0];
    end
    mr = {1'b0, m} + {24'b0, rnd & (stk | m[0])};
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 10'd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) r = FP_QNAN;
    else if (a_inf || b_inf)               r = {s, 8'hFF, 23'b0};
    else if (a_zero || b_zero)             r = {s, 31'b0};
    else if ($signed(e) >= 10'sd255)       r = {s, 8'hFF, 23'b0};
    else if ($signed(e) <= 10'sd0)         r = {s, 31'b0};
    else                                   r = {s, e[7:0], mr[22:0]};
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
