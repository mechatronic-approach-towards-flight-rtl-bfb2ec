// Single-precision floating-point reciprocal, used as a processor custom
// instruction (the RLS update divides by a scalar).
//
// For a = (-1)^s * 1.m * 2^E the result is (-1)^s * (1/1.m) * 2^-E. The
// significand quotient 1/1.m is produced one bit per clock by restoring
// division of 1.0 by 1.m: 26 quotient bits (enough for 24 result bits and a
// round bit, whichever of 1 or 1/2 the leading bit weighs) plus a sticky bit
// from the final remainder, then rounded to nearest, ties to even. The
// result is therefore correctly rounded. Special values: 1/±0 = ±inf,
// 1/±inf = ±0, NaN gives 0x7FC00000, subnormal inputs count as zero and
// subnormal results are flushed to zero.
//
// Timing: `start` loads the operand; the unit is busy for 26 division
// cycles and `done` is high with the result in the 28th cycle after the cycle in
// which `start` is high. A start
// while busy restarts the operation.
// That the reciprocal is a hardware custom instruction follows the
// document; the digit-recurrence method and latency are this design's.
module fp_recip
  import flutter_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] a,
  output logic [31:0] result,
  output logic        done,
  output logic        busy
);
  localparam int unsigned QB = 26;

  logic [31:0] op;
  logic [23:0] div;        // divisor 1.m scaled by 2^23
  logic [25:0] rem;        // partial remainder
  logic [QB-1:0] q;
  logic [4:0]  cnt;

  // final packing from q, rem and op
  logic [31:0] r;
  always_comb begin
    logic [7:0]  ea;
    logic [9:0]  e;
    logic [23:0] m;
    logic        rnd, stk;
    logic [24:0] mr;
    ea = op[30:23];
    if (q[QB-1]) begin                 // 1/1.m == 1 (m == 0)
      m   = q[QB-1:2];
      rnd = q[1];
      stk = q[0] | (rem != 0);
      e   = 10'd254 - {2'b00, ea};
    end else begin
      m   = q[QB-2:1];
      rnd = q[0];
      stk = (rem != 0);
      e   = 10'd253 - {2'b00, ea};
    end
    mr = {1'b0, m} + {24'b0, rnd & (stk | m[0])};
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 10'd1;
    end
    if (ea == 8'hFF && op[22:0] != 0) r = FP_QNAN;
    else if (ea == 8'hFF)             r = {op[31], 31'b0};
    else if (ea == 8'h00)             r = {op[31], 8'hFF, 23'b0};
    else if ($signed(e) <= 10'sd0)    r = {op[31], 31'b0};
    else                              r = {op[31], e[7:0], mr[22:0]};
  end

  wire        ge   = (rem >= {2'b00, div});
  wire [25:0] diff = rem - {2'b00, div};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op <= '0; div <= '0; rem <= '0; q <= '0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; result <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        op   <= a;
        div  <= {1'b1, a[22:0]};
        rem  <= 26'd1 << 23;           // 1.0
        q    <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (cnt == 5'(QB)) begin
          result <= r;
          done   <= 1'b1;
          busy   <= 1'b0;
        end else begin
          q   <= {q[QB-2:0], ge};
          rem <= (ge ? diff : rem) << 1;
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
