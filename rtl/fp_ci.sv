// Floating-point custom instruction slot of the soft processor.
//
// The processor's arithmetic for the recursive least-squares identification
// and the damping coefficients is single-precision floating point; the four
// operations it needs most are done in hardware: addition, multiplication,
// reciprocal and square root. This module presents them as one extended
// custom instruction whose `n` field selects the operation (see ci_op_e:
// 0 add, 1 multiply, 2 reciprocal of dataa, 3 square root of dataa).
//
// Interface: Nios II style multi-cycle custom instruction. `start` (qualified
// by clk_en) launches the operation selected by `n` with dataa/datab;
// `result` is valid while `done` is high. Latencies: add and multiply 1
// cycle, square root 27 cycles, reciprocal 28 cycles (counted from the cycle
// in which start is high to the one in which done is high). The result stays on
// `result` until the next operation finishes.
// The set of operations follows the document; the encoding of `n`, the
// handshake details and the latencies are this design's.
module fp_ci
  import flutter_pkg::*;
(
  input  logic        clk,
  input  logic        reset,     // active high, as on the processor side
  input  logic        clk_en,
  input  logic        start,
  input  logic [1:0]  n,
  input  logic [31:0] dataa,
  input  logic [31:0] datab,
  output logic [31:0] result,
  output logic        done
);
  wire rst_n = !reset;
  wire go    = start && clk_en;

  logic [31:0] r_add, r_mul, r_rcp, r_sqr;
  logic        d_add, d_mul, d_rcp, d_sqr;
  logic        b_rcp, b_sqr;
  ci_op_e      op_q;

  fp_add   u_add (.clk, .rst_n, .start(go && n == CI_ADD), .a(dataa), .b(datab),
                  .result(r_add), .done(d_add));
  fp_mul   u_mul (.clk, .rst_n, .start(go && n == CI_MUL), .a(dataa), .b(datab),
                  .result(r_mul), .done(d_mul));
  fp_recip u_rcp (.clk, .rst_n, .start(go && n == CI_RECIP), .a(dataa),
                  .result(r_rcp), .done(d_rcp), .busy(b_rcp));
  fp_sqrt  u_sqr (.clk, .rst_n, .start(go && n == CI_SQRT), .a(dataa),
                  .result(r_sqr), .done(d_sqr), .busy(b_sqr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  op_q <= CI_ADD;
    else if (go) op_q <= ci_op_e'(n);
  end

  always_comb begin
    unique case (op_q)
      CI_ADD:   begin result = r_add; done = d_add; end
      CI_MUL:   begin result = r_mul; done = d_mul; end
      CI_RECIP: begin result = r_rcp; done = d_rcp; end
      default:  begin result = r_sqr; done = d_sqr; end
    endcase
  end

  // one operation at a time: the processor stalls until done (the busy
  // flags are cleared by reset, so the check needs no reset qualifier)
  property p_no_overlap;
    @(posedge clk) go |-> !(b_rcp || b_sqr);
  endproperty
  a_no_overlap: assert property (p_no_overlap);

endmodule
