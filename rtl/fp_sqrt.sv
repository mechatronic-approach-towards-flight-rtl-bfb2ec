// Single-precision floating-point square root, used as a processor custom
// instruction (damping ratio and modal frequency from the identified model).
//
// For a = 1.m * 2^E the exponent is halved (floor(E/2)); when E is odd the
// significand is doubled first, so the radicand v lies in [1,4) and its
// root in [1,2). The root of v * 2^48 is produced one bit per clock by the
// restoring digit-by-digit method (two radicand bits per step): 25 root
// bits, i.e. 24 result bits and a round bit, plus a sticky bit from the
// final remainder, then rounded to nearest, ties to even, so the result is
// correctly rounded. Special values: sqrt(±0) = ±0, sqrt(+inf) = +inf,
// negative numbers and NaN give 0x7FC00000, subnormal inputs count as zero.
//
// Timing: `start` loads the operand; the unit is busy for 25 steps and
// `done` is high with the result in the 27th cycle after the cycle in
// which `start` is high.
// That the square root is a hardware custom instruction follows the
// document; the method and latency are this design's.
module fp_sqrt
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
  localparam int unsigned RB = 25;

  logic [31:0]   op;
  logic [49:0]   rad;      // radicand bits still to bring down
  logic [27:0]   rem;
  logic [RB-1:0] root;
  logic [4:0]    cnt;

  logic [31:0] r;
  always_comb begin
    logic [7:0]  ea;
    logic [9:0]  e;
    logic [24:0] mr;
    logic        stk;
    ea  = op[30:23];
    e   = 10'(($signed({2'b00, ea}) - 10'sd127) >>> 1) + 10'd127;
    stk = (rem != 0);
    mr  = {1'b0, root[24:1]} + {24'b0, root[0] & (stk | root[1])};
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 10'd1;
    end
    if (ea == 8'hFF && op[22:0] != 0) r = FP_QNAN;
    else if (ea == 8'h00)             r = {op[31], 31'b0};
    else if (op[31])                  r = FP_QNAN;
    else if (ea == 8'hFF)             r = {1'b0, 8'hFF, 23'b0};
    else                              r = {1'b0, e[7:0], mr[22:0]};
  end

  wire [27:0] cur   = {rem[25:0], rad[49:48]};
  wire [27:0] trial = {1'b0, root, 2'b01};
  wire        ge    = (cur >= trial);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op <= '0; rad <= '0; rem <= '0; root <= '0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; result <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        op   <= a;
        // even exponent (odd biased exponent): v = 1.m, else v = 2 * 1.m
        rad  <= a[23] ? {1'b1, a[22:0], 26'b0} >> 1 : {1'b1, a[22:0], 26'b0};
        rem  <= '0;
        root <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (cnt == 5'(RB)) begin
          result <= r;
          done   <= 1'b1;
          busy   <= 1'b0;
        end else begin
          rem  <= ge ? cur - trial : cur;
          root <= {root[RB-2:0], ge};
          rad  <= rad << 2;
          cnt  <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
